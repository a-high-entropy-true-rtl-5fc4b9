// tb_noise_source_configs: the noise-source configurations of the design
// space, 4 or 32 rings of 3 or 13 inverters, each sampled at 500 MHz and
// at 50 MHz with the behavioural ring model (inverter delays 275..282 ps,
// 30 ps Gaussian jitter). For each it reports the proportion of ones, the
// longest run and the lag-1 agreement rate over 20,000 bits.
// Checked: every raw bit matches the XOR of the ring levels two clock
// edges earlier, and at both rates the chosen 32 x 13 configuration has a
// proportion of ones within 0.5 +/- 0.02, lag-1 agreement within
// 0.5 +/- 0.03 and no run reaching the repetition count cutoff of 22.
// The statistics of the other configurations are reported only: they
// describe the model, not silicon. The configurations and the two
// sampling rates follow the document; the statistics are this
// testbench's own, far smaller than the document's test suites.
`timescale 1ns / 100fs
module tb_noise_source_configs;
  localparam int N = 20000;

  logic clk_fast, clk_slow, rst_n;
  logic d [8];
  int ones [8], maxrun [8], agree [8], c [8], f [8];

  initial begin clk_fast = 1'b0; clk_slow = 1'b0; rst_n = 1'b0; end
  always #1  clk_fast = ~clk_fast;   // 500 MHz
  always #10 clk_slow = ~clk_slow;   // 50 MHz

  ns_stats_run #(.N_RO(4),  .N_INV(3),  .N_SAMPLES(N)) u0 (.clk(clk_fast), .rst_n, .done(d[0]), .ones(ones[0]), .maxrun(maxrun[0]), .agree(agree[0]), .checks(c[0]), .failures(f[0]));
  ns_stats_run #(.N_RO(4),  .N_INV(13), .N_SAMPLES(N)) u1 (.clk(clk_fast), .rst_n, .done(d[1]), .ones(ones[1]), .maxrun(maxrun[1]), .agree(agree[1]), .checks(c[1]), .failures(f[1]));
  ns_stats_run #(.N_RO(32), .N_INV(3),  .N_SAMPLES(N)) u2 (.clk(clk_fast), .rst_n, .done(d[2]), .ones(ones[2]), .maxrun(maxrun[2]), .agree(agree[2]), .checks(c[2]), .failures(f[2]));
  ns_stats_run #(.N_RO(32), .N_INV(13), .N_SAMPLES(N)) u3 (.clk(clk_fast), .rst_n, .done(d[3]), .ones(ones[3]), .maxrun(maxrun[3]), .agree(agree[3]), .checks(c[3]), .failures(f[3]));
  ns_stats_run #(.N_RO(4),  .N_INV(3),  .N_SAMPLES(N)) u4 (.clk(clk_slow), .rst_n, .done(d[4]), .ones(ones[4]), .maxrun(maxrun[4]), .agree(agree[4]), .checks(c[4]), .failures(f[4]));
  ns_stats_run #(.N_RO(4),  .N_INV(13), .N_SAMPLES(N)) u5 (.clk(clk_slow), .rst_n, .done(d[5]), .ones(ones[5]), .maxrun(maxrun[5]), .agree(agree[5]), .checks(c[5]), .failures(f[5]));
  ns_stats_run #(.N_RO(32), .N_INV(3),  .N_SAMPLES(N)) u6 (.clk(clk_slow), .rst_n, .done(d[6]), .ones(ones[6]), .maxrun(maxrun[6]), .agree(agree[6]), .checks(c[6]), .failures(f[6]));
  ns_stats_run #(.N_RO(32), .N_INV(13), .N_SAMPLES(N)) u7 (.clk(clk_slow), .rst_n, .done(d[7]), .ones(ones[7]), .maxrun(maxrun[7]), .agree(agree[7]), .checks(c[7]), .failures(f[7]));

  initial begin
    #2_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=1 failures=1");
    $finish;
  end

  initial begin
    automatic int checks = 0, failures = 0;
    automatic string names [4] = '{"4 RO x 3 INV", "4 RO x 13 INV", "32 RO x 3 INV", "32 RO x 13 INV"};
    repeat (3) @(negedge clk_slow);
    rst_n = 1;
    wait (d[0] && d[1] && d[2] && d[3] && d[4] && d[5] && d[6] && d[7]);
    for (int k = 0; k < 8; k++) begin
      $display("%-15s at %0d MHz: ones %0.4f  longest run %0d  lag-1 agreement %0.4f",
               names[k % 4], k < 4 ? 500 : 50, real'(ones[k]) / N, maxrun[k],
               real'(agree[k]) / (N - 1));
      checks += c[k];
      failures += f[k];
    end
    for (int k = 3; k < 8; k += 4) begin
      checks++;
      if (ones[k] < N * 48 / 100 || ones[k] > N * 52 / 100) begin
        failures++; $display("32 x 13 biased");
      end
      checks++;
      if (agree[k] < (N - 1) * 47 / 100 || agree[k] > (N - 1) * 53 / 100) begin
        failures++; $display("32 x 13 correlated");
      end
      checks++;
      if (maxrun[k] >= 22) begin
        failures++; $display("32 x 13 run reaches the cutoff");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
