// ns_stats_run: testbench helper. Runs one noise source of N_RO rings of
// N_INV inverters, sampled by the given clock, for N_SAMPLES raw bits and
// gathers simple statistics: number of ones, longest run of equal bits,
// and the lag-1 agreement count (how often a bit equals the previous one).
// It also checks, every sample, that the raw bit is the XOR of the ring
// levels seen two clock edges earlier.
`timescale 1ns / 100fs
module ns_stats_run #(
  parameter int unsigned N_RO      = 32,
  parameter int unsigned N_INV     = 13,
  parameter int unsigned N_SAMPLES = 20000
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   ones,
  output int   maxrun,
  output int   agree,
  output int   checks,
  output int   failures
);
  logic rb, s1, s2;

  noise_source #(.N_RO(N_RO), .N_INV(N_INV)) dut (
    .clk, .rst_n, .enable_i(rst_n), .dff_enable_i(rst_n), .rnd_bit_o(rb));

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1 <= 0; s2 <= 0;
    end else begin
      s2 <= s1;
      s1 <= ^dut.ro;
    end
  end

  initial begin
    int run;
    logic prev;
    done = 0; ones = 0; maxrun = 0; agree = 0; checks = 0; failures = 0;
    run = 0; prev = 0;
    @(posedge rst_n);
    repeat (8) @(negedge clk);
    for (int i = 0; i < int'(N_SAMPLES); i++) begin
      @(negedge clk);
      checks++;
      if (rb !== s2) failures++;
      ones += rb;
      if (i > 0 && rb == prev) begin agree++; run++; end
      else run = 1;
      if (run > maxrun) maxrun = run;
      prev = rb;
    end
    done = 1;
  end
endmodule
