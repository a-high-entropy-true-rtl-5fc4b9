// key_shift_reg: serial-in, parallel-out register that gathers the raw
// random bits into the output key.
//
// While shift_en_i is high, each rising edge shifts the register one place
// towards the MSB and puts rnd_bit_i in bit 0, so after N_BITS_KEY enabled
// cycles every bit has been replaced and the bit that entered first is at
// bit N_BITS_KEY-1. When shift_en_i is low the key is held. The register
// and its N_BITS_KEY parameter are the document's; the shift direction and
// the reset value (all zero) are this design's choices.
`timescale 1ns / 100fs
module key_shift_reg #(
  parameter int unsigned N_BITS_KEY = 1500
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  shift_en_i,
  input  logic                  rnd_bit_i,
  output logic [N_BITS_KEY-1:0] out_key_o
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          out_key_o <= '0;
    else if (shift_en_i) out_key_o <= {out_key_o[N_BITS_KEY-2:0], rnd_bit_i};
  end

  initial assert (N_BITS_KEY >= 2) else $error("key_shift_reg: N_BITS_KEY must be at least 2");

endmodule
