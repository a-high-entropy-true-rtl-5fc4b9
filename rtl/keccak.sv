// keccak: iterative Keccak-f[1600] unit used as the conditioning stage of
// the TRNG, as a DRBG, or as a free-standing permutation core.
//
// A start pulse loads the 1600-bit state and the 24 rounds are then run
// one per clock through a single combinational keccak_round, so the
// permuted state is available 24 cycles after the start cycle. The source
// of the loaded state is chosen by cond_i:
//   cond_i = 1  the N_BITS_KEY-bit TRNG key msg_i, padded with the Keccak
//               multi-rate rule pad10*1 to the full 1600-bit state (key in
//               bits [N_BITS_KEY-1:0], a 1 at bit N_BITS_KEY, a 1 at bit
//               1599, zeros between);
//   cond_i = 0  the external state state_i, unchanged, so that a host can
//               use the core for its own SHA-3 absorb/squeeze steps.
// The one-round-per-cycle schedule and the 24-cycle latency follow the
// document; the pad10*1 rule and the load-from-external-state interface
// are this design's choices.
//
// Timing: start_i is sampled on a rising edge while busy_o is low; that
// edge already applies round 0. key_ready_o and intr_o pulse together for
// one cycle when state_o first holds the result (23 edges later), and
// state_o then holds it until the next start. A start while busy_o is high
// is ignored.
`timescale 1ns / 100fs
module keccak
  import trng_pkg::*;
#(
  parameter int unsigned N_BITS_KEY = 1500
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start_i,
  input  logic                  cond_i,
  input  logic [N_BITS_KEY-1:0] msg_i,
  input  keccak_state_t         state_i,
  output keccak_state_t         state_o,
  output logic                  busy_o,
  output logic                  key_ready_o,
  output logic                  intr_o
);

  keccak_state_t state_q, padded, round_in, round_out;
  logic [4:0]    round_q;
  logic          busy_q, done_q;

  // pad10*1 of the key to one full 1600-bit block
  always_comb begin
    padded                  = '0;
    padded[N_BITS_KEY-1:0]  = msg_i;
    padded[N_BITS_KEY]      = 1'b1;
    padded[KECCAK_B-1]      = 1'b1;
  end

  assign round_in = busy_q ? state_q : (cond_i ? padded : state_i);

  keccak_round u_round (
    .state_i (round_in),
    .round_i (busy_q ? round_q : 5'd0),
    .state_o (round_out)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= '0;
      round_q <= '0;
      busy_q  <= 1'b0;
      done_q  <= 1'b0;
    end else begin
      done_q <= 1'b0;
      if (busy_q) begin
        state_q <= round_out;
        if (round_q == 5'(KECCAK_ROUNDS - 1)) begin
          busy_q  <= 1'b0;
          done_q  <= 1'b1;
          round_q <= '0;
        end else begin
          round_q <= round_q + 5'd1;
        end
      end else if (start_i) begin
        state_q <= round_out;
        round_q <= 5'd1;
        busy_q  <= 1'b1;
      end
    end
  end

  assign state_o     = state_q;
  assign busy_o      = busy_q;
  assign key_ready_o = done_q;
  assign intr_o      = done_q;

  // The padding needs two free bits above the key.
  initial assert (N_BITS_KEY >= 1 && N_BITS_KEY <= KECCAK_B - 2)
    else $error("keccak: N_BITS_KEY must be in 1..1598");

endmodule
