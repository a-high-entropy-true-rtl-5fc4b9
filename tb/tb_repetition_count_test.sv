// tb_repetition_count_test: drives runs of random length (1..60) of each
// bit value, with random gaps in sample_en, and compares the error pulse
// cycle by cycle with a software model of the repetition count test
// (error when a run reaches C, run count restarting after an error).
`timescale 1ns / 100fs
module tb_repetition_count_test;
  localparam int unsigned C = 22;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, b = 1'b0, err;
  int checks = 0, failures = 0, errors_seen = 0;

  repetition_count_test #(.C(C)) dut (.clk, .rst_n, .sample_en(en), .bit_i(b), .error_o(err));

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model state
  bit m_first = 1, m_a = 0, m_exp = 0;
  int m_b = 0;

  task automatic model_step(input bit s);
    m_exp = 0;
    if (m_first || s != m_a) begin
      m_a = s; m_b = 1; m_first = 0;
    end else begin
      m_b++;
      if (m_b >= C) begin
        m_exp = 1;
        m_b = 1;
      end
    end
  endtask

  initial begin
    bit v;
    int len;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    v = 0;
    for (int r = 0; r < 400; r++) begin
      len = 1 + ($urandom % 60);
      for (int i = 0; i < len; i++) begin
        // random idle cycles must not count
        while (($urandom % 4) == 0) begin
          en = 0; b = ~v;
          @(negedge clk);
          checks++;
          if (err !== 1'b0) begin failures++; $display("error without sample"); end
        end
        en = 1; b = v;
        model_step(v);
        @(negedge clk);
        checks++;
        if (err !== m_exp) begin
          failures++;
          $display("run %0d sample %0d: err=%b expected %b", r, i, err, m_exp);
        end
        if (m_exp) errors_seen++;
      end
      v = ~v;
    end
    en = 0;
    checks++;
    if (errors_seen < 10) begin failures++; $display("too few runs reached C"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
