// tb_adaptive_proportion_test: feeds windows of bits with a chosen
// probability of ones (fair, and strongly biased either way), with random
// gaps in sample_en, and compares error and window-end pulses cycle by
// cycle with a software model of the adaptive proportion test. Run with a
// shortened window (W = 64, C = 48) so many windows fit in the run.
`timescale 1ns / 100fs
module tb_adaptive_proportion_test;
  localparam int unsigned W = 64;
  localparam int unsigned C = 48;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, b = 1'b0, err, wend;
  int checks = 0, failures = 0, errors_seen = 0, windows_seen = 0;

  adaptive_proportion_test #(.W(W), .C(C)) dut (
    .clk, .rst_n, .sample_en(en), .bit_i(b), .error_o(err), .window_end_o(wend));

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int m_i = 0, m_b = 0;
  bit m_a = 0, m_err = 0, m_wend = 0;

  task automatic model_step(input bit s);
    m_err = 0; m_wend = 0;
    if (m_i == 0) begin
      m_a = s; m_b = 1; m_i = 1;
    end else begin
      if (s == m_a) begin
        m_b++;
        if (m_b == C) m_err = 1;
      end
      m_i++;
      if (m_i == W) begin m_i = 0; m_wend = 1; end
    end
  endtask

  initial begin
    int pct;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int w = 0; w < 120; w++) begin
      case (w % 3)
        0: pct = 50;
        1: pct = 95;
        default: pct = 5;
      endcase
      for (int i = 0; i < int'(W); i++) begin
        while (($urandom % 5) == 0) begin
          en = 0; b = 1'($urandom);
          @(negedge clk);
          checks++;
          if (err !== 1'b0 || wend !== 1'b0) begin failures++; $display("pulse without sample"); end
        end
        en = 1;
        b = (($urandom % 100) < pct);
        model_step(b);
        @(negedge clk);
        checks++;
        if (err !== m_err || wend !== m_wend) begin
          failures++;
          $display("window %0d sample %0d: err=%b/%b wend=%b/%b", w, i, err, m_err, wend, m_wend);
        end
        errors_seen += m_err;
        windows_seen += m_wend;
      end
    end
    en = 0;
    checks++;
    if (errors_seen < 20 || windows_seen != 120) begin
      failures++;
      $display("errors %0d windows %0d", errors_seen, windows_seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
