// adaptive_proportion_test: NIST SP 800-90B adaptive proportion test on a
// serial bitstream.
//
// The stream is cut into windows of W samples. The first sample of a
// window is stored as A with count B = 1; each of the other W-1 samples
// equal to A increments B. When B reaches the cutoff C an error is
// signalled. W = 1024 is the window the document prescribes for binary
// sources. The default C = 590 is this design's choice: the NIST cutoff
// 1 + CRITBINOM(W, 2^-H, 1 - alpha) for H = 0.9982 and alpha = 2^-20.
// The error is raised once per window, on the sample that makes B equal
// to C; later samples of the same window do not repeat it.
//
// Interface: sample_en qualifies bit_i. error_o is a registered one-cycle
// pulse. window_end_o pulses (registered) after the last sample of each
// window, whether or not it failed; health_test uses it to tell a clean
// window.
`timescale 1ns / 100fs
module adaptive_proportion_test #(
  parameter int unsigned W = 1024,
  parameter int unsigned C = 590
) (
  input  logic clk,
  input  logic rst_n,
  input  logic sample_en,
  input  logic bit_i,
  output logic error_o,
  output logic window_end_o
);

  localparam int unsigned IW = $clog2(W);
  localparam int unsigned BW = $clog2(W + 1);

  logic          a_q;
  logic [IW-1:0] idx_q;
  logic [BW-1:0] b_q, b_next;

  assign b_next = b_q + BW'(bit_i == a_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q          <= 1'b0;
      idx_q        <= '0;
      b_q          <= '0;
      error_o      <= 1'b0;
      window_end_o <= 1'b0;
    end else begin
      error_o      <= 1'b0;
      window_end_o <= 1'b0;
      if (sample_en) begin
        if (idx_q == '0) begin
          a_q   <= bit_i;
          b_q   <= BW'(1);
          idx_q <= IW'(1);
        end else begin
          b_q <= b_next;
          if (b_next == BW'(C) && bit_i == a_q) error_o <= 1'b1;
          if (idx_q == IW'(W - 1)) begin
            idx_q        <= '0;
            window_end_o <= 1'b1;
          end else begin
            idx_q <= idx_q + IW'(1);
          end
        end
      end
    end
  end

  initial assert (W >= 2 && (W & (W - 1)) == 0 && C >= 2 && C <= W)
    else $error("adaptive_proportion_test: W must be a power of two and 2 <= C <= W");

endmodule
