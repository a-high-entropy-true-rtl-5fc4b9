// tb_health_test: drives the health test with phases of fair random bits,
// stuck bits and biased bits, with gaps in the enable, and compares error
// and total_failure cycle by cycle with a software model of both tests and
// of the consecutive-error counter (cleared by one clean window). Small
// thresholds keep the run short. After each total failure the block is
// reset. Checks that isolated errors were forgiven and that persistent
// ones ended in total failure.
`timescale 1ns / 100fs
module tb_health_test;
  localparam int unsigned RC = 8, AW = 32, AC = 26, FT = 3;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, b = 1'b0, err, tf;
  int checks = 0, failures = 0, n_tf = 0, n_clear = 0, n_err = 0;

  health_test #(.RCT_C(RC), .APT_W(AW), .APT_C(AC), .FAIL_THRESH(FT)) dut (
    .clk, .rst_n, .enable_health_test_i(en), .rnd_bit_i(b),
    .error_o(err), .total_failure_o(tf));

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model
  bit r_first, r_a, a_a, dirty, m_tf, e_r, e_a, e_w;
  int r_b, a_i, a_b, cnt;
  bit m_err;      // expected error_o after this sample
  bit m_tf_next;  // expected total_failure_o one cycle after that

  task automatic model_reset();
    r_first = 1; r_a = 0; r_b = 0; a_i = 0; a_b = 0; a_a = 0;
    dirty = 0; cnt = 0; m_tf = 0; m_err = 0;
  endtask

  // one sample; returns the pulses that appear on the next cycle
  task automatic model_sample(input bit s);
    e_r = 0; e_a = 0; e_w = 0;
    if (r_first || s != r_a) begin r_a = s; r_b = 1; r_first = 0; end
    else begin r_b++; if (r_b >= RC) begin e_r = 1; r_b = 1; end end
    if (a_i == 0) begin a_a = s; a_b = 1; a_i = 1; end
    else begin
      if (s == a_a) begin a_b++; if (a_b == AC) e_a = 1; end
      a_i++;
      if (a_i == AW) begin a_i = 0; e_w = 1; end
    end
  endtask

  // counter update on the cycle the pulses are visible
  task automatic model_counter(input bit e, input bit w);
    if (e) begin
      if (cnt < FT) cnt++;
      if (cnt >= FT) m_tf = 1;
    end else if (w && !dirty) begin
      if (cnt != 0) n_clear++;
      cnt = 0;
    end
    if (w) dirty = 0; else if (e) dirty = 1;
  endtask

  bit pend_e = 0, pend_w = 0;

  task automatic cycle(input bit en_v, input bit b_v);
    bit tf_before;
    en = en_v; b = b_v;
    @(negedge clk);
    // the pulses of the previous sample were visible during this cycle
    model_counter(pend_e, pend_w);
    pend_e = 0; pend_w = 0;
    if (en_v) begin
      model_sample(b_v);
      pend_e = e_r | e_a; pend_w = e_w;
    end
    checks++;
    if (err !== pend_e || tf !== m_tf) begin
      failures++;
      $display("t=%0t err=%b/%b tf=%b/%b", $time, err, pend_e, tf, m_tf);
    end
    n_err += pend_e;
  endtask

  task automatic do_reset();
    rst_n = 0; en = 0;
    @(negedge clk);
    rst_n = 1;
    model_reset();
    pend_e = 0; pend_w = 0;
  endtask

  initial begin
    int phase, len;
    model_reset();
    repeat (2) @(negedge clk);
    do_reset();
    for (int p = 0; p < 300; p++) begin
      phase = $urandom % 4;
      len = 10 + ($urandom % 120);
      for (int i = 0; i < len; i++) begin
        bit v;
        case (phase)
          0, 1: v = 1'($urandom);                    // fair
          2: v = 1'b1;                           // stuck
          default: v = (($urandom % 100) < 90);  // biased
        endcase
        cycle(($urandom % 6) != 0, v);
      end
      if (m_tf) begin
        n_tf++;
        repeat (3) cycle(1'b1, 1'($urandom));
        do_reset();
      end
    end
    checks++;
    if (n_tf == 0 || n_clear == 0 || n_err < 10) begin
      failures++;
      $display("coverage: total failures %0d counter clears %0d errors %0d", n_tf, n_clear, n_err);
    end
    $display("coverage: total failures %0d counter clears %0d errors %0d", n_tf, n_clear, n_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
