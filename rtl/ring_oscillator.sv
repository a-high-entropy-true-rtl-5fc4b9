// ring_oscillator: BEHAVIOURAL MODEL (not synthesizable) of one ring
// oscillator of the noise source: N_INV inverters in a loop closed through
// the enable gate. On an FPGA or ASIC this is a combinational loop placed
// by hand; in simulation it is replaced by this timing model.
//
// Model: while enable is high the output toggles every half period, and a
// half period is the sum of the N_INV inverter delays (the period is
// 2 * N_INV * t_inv, the gate in the loop being neglected as in the
// usual ring-oscillator formula). Every inverter has its own mean delay,
// drawn once per instance in 275..282 ps, and each traversal adds to it a
// Gaussian jitter term with sigma = 30 ps; these are the local-jitter
// figures of the document's simulation model. The Gaussian is
// approximated by the sum of 12 uniform variates (Irwin-Hall). Random
// numbers come from a private xorshift32 generator seeded by SEED, so
// every instance has its own reproducible stream. While enable is low the
// output rests at 0. Delays are rounded to whole picoseconds and the ring
// starts half a picosecond after enable rises, so that for a clock on a
// whole-picosecond grid no output edge ever coincides with a clock edge.
//
// Interface: enable in, ro_out out. Needs a timing-capable simulator.
//
// Lint note: Verilator cannot prove the computed delay is non-zero and
// warns about a possible #0. It never is: the 12-uniform sum bounds the
// jitter to +/- 6 sigma = 180 ps, so each inverter adds at least 95 ps.
`timescale 1ps / 100fs
module ring_oscillator #(
  parameter int unsigned N_INV = 13,
  parameter int unsigned SEED  = 1
) (
  input  logic enable,
  output logic ro_out
);

  // all delays are kept in femtoseconds as integers
  localparam longint MEAN_MIN_FS  = 275_000;  // 275 ps
  localparam longint MEAN_SPAN_FS = 7_000;    // up to 282 ps
  localparam longint SIGMA_FS     = 30_000;   // 30 ps

  logic [31:0] rng;
  longint      mean_fs [N_INV];

  function automatic logic [31:0] xorshift(input logic [31:0] x);
    logic [31:0] y;
    y = x ^ (x << 13);
    y = y ^ (y >> 17);
    y = y ^ (y << 5);
    return y;
  endfunction

  // next 16-bit uniform variate
  function automatic longint uniform16();
    rng = xorshift(rng);
    return longint'(rng[31:16]);
  endfunction

  // Gaussian with sigma = 65536: sum of 12 uniforms minus their mean
  function automatic longint gauss16();
    longint s = 0;
    for (int k = 0; k < 12; k++) s += uniform16();
    return s - 12 * 32768;
  endfunction

  function automatic longint half_period_ps();
    longint h = 0;
    for (int i = 0; i < int'(N_INV); i++) h += mean_fs[i] + (SIGMA_FS * gauss16()) / 65536;
    return (h + 500) / 1000;
  endfunction

  initial begin
    rng = 32'h9E3779B9 ^ (SEED * 32'h85EBCA6B);
    if (rng == 0) rng = 32'h1;
    for (int i = 0; i < 8; i++) void'(uniform16());
    for (int i = 0; i < int'(N_INV); i++)
      mean_fs[i] = MEAN_MIN_FS + (MEAN_SPAN_FS * uniform16()) / 65536;
    ro_out = 1'b0;
  end

  always begin
    if (!enable) begin
      ro_out = 1'b0;
      @(posedge enable);
      #0.5;
    end else begin
      #(half_period_ps());
      if (enable) ro_out = ~ro_out;
    end
  end

endmodule
