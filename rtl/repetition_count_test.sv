// repetition_count_test: NIST SP 800-90B repetition count test on a serial
// bitstream.
//
// The test keeps the current bit value A and the length B of the run of
// that value. Each accepted sample either extends the run (B+1) or starts a
// new one (A = sample, B = 1). When B reaches the cutoff C the test
// signals an error. The document gives the algorithm and the cutoff formula
// C = 1 + ceil(-log2(alpha) / H); the default C = 22 is that formula with
// alpha = 2^-20 and H = 0.9982 (the measured min-entropy), a choice of this
// design. Also this design's choice: after an error the run count restarts
// at 1, so a source stuck at one value keeps raising one error every C-1
// samples instead of a continuous level; the consecutive-error counter of
// health_test relies on those separate pulses.
//
// Interface: sample_en qualifies bit_i (one new raw bit). error_o is a
// registered one-cycle pulse, valid the cycle after the sample that made
// the run reach C.
`timescale 1ns / 100fs
module repetition_count_test #(
  parameter int unsigned C = 22
) (
  input  logic clk,
  input  logic rst_n,
  input  logic sample_en,
  input  logic bit_i,
  output logic error_o
);

  localparam int unsigned BW = $clog2(C + 1);

  logic          a_q, first_q;
  logic [BW-1:0] b_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q     <= 1'b0;
      b_q     <= '0;
      first_q <= 1'b1;
      error_o <= 1'b0;
    end else begin
      error_o <= 1'b0;
      if (sample_en) begin
        if (first_q || bit_i != a_q) begin
          a_q     <= bit_i;
          b_q     <= BW'(1);
          first_q <= 1'b0;
        end else if (b_q + BW'(1) >= BW'(C)) begin
          error_o <= 1'b1;
          b_q     <= BW'(1);
        end else begin
          b_q <= b_q + BW'(1);
        end
      end
    end
  end

  initial assert (C >= 2) else $error("repetition_count_test: C must be at least 2");

endmodule
