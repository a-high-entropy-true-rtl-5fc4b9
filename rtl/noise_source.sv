// noise_source: ring-oscillator entropy source.
//
// N_RO ring oscillators of N_INV inverters run in parallel while enable_i
// is high. Each oscillator output is sampled by its own D flip-flop, the
// N_RO samples are XORed together, and one last flip-flop registers the
// XOR as the raw random bit. The accumulated timing jitter of the rings
// makes the sampled phases unpredictable. This structure and the
// 32 x 13 configuration are the document's. The flip-flops advance only
// while dff_enable_i is high (the control unit's flip-flop enable), so
// every rnd_bit_o value is one fresh sample and holds otherwise; their
// asynchronous reset to 0 is this design's choice.
//
// Timing: rnd_bit_o is the XOR of the oscillator levels seen at the
// second-last enabled rising edge (two flip-flop stages).
// The ring oscillators themselves are a behavioural model
// (ring_oscillator); the flip-flops and the XOR tree are synthesizable.
`timescale 1ns / 100fs
module noise_source #(
  parameter int unsigned N_RO  = 32,
  parameter int unsigned N_INV = 13
) (
  input  logic clk,
  input  logic rst_n,
  input  logic enable_i,
  input  logic dff_enable_i,
  output logic rnd_bit_o
);

  logic [N_RO-1:0] ro, sample_q;

  for (genvar i = 0; i < N_RO; i++) begin : g_ro
    ring_oscillator #(.N_INV(N_INV), .SEED(i + 1)) u_ro (
      .enable (enable_i),
      .ro_out (ro[i])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sample_q  <= '0;
      rnd_bit_o <= 1'b0;
    end else if (dff_enable_i) begin
      sample_q  <= ro;
      rnd_bit_o <= ^sample_q;
    end
  end

endmodule
