// tb_trng_top_workloads: the two shorter key lengths the design is meant
// to be configured for in conditioned mode, run side by side:
//   * a 320-bit seed (s + 64 bits for a 256-bit security level), whose
//     1600-bit outputs come every 320 + 25 cycles: 4.64 bits per cycle;
//   * a 1206-bit key, whose outputs come every 1206 + 25 cycles:
//     1.30 bits per cycle.
// Each generator is checked key by key against the reference Keccak and
// its key period is measured exactly (key length, one ES32 cycle and the
// 24 Keccak rounds, the host acknowledging each result at once).
`timescale 1ns / 100fs
module tb_trng_top_workloads;
  logic clk = 1'b0, rst_n = 1'b0;
  logic d1, d2;
  int c1, f1, p1, c2, f2, p2;
  int checks, failures;

  always #3.333 clk = ~clk;

  conditioned_key_run #(.NK(320),  .N_KEYS(5)) u_seed (.clk, .rst_n, .done(d1), .checks(c1), .failures(f1), .period(p1));
  conditioned_key_run #(.NK(1206), .N_KEYS(3)) u_key  (.clk, .rst_n, .done(d2), .checks(c2), .failures(f2), .period(p2));

  initial begin
    #1_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c1 + c2, f1 + f2 + 1);
    $finish;
  end

  initial begin
    real r1, r2;
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (d1 && d2);
    checks = c1 + c2;
    failures = f1 + f2;
    r1 = 1600.0 / real'(p1);
    r2 = 1600.0 / real'(p2);
    $display("320-bit seed: %0.3f bits/cycle; 1206-bit key: %0.3f bits/cycle", r1, r2);
    checks++;
    if (!(r1 > 4.6 && r1 < 4.7 && r2 > 1.28 && r2 < 1.32)) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
