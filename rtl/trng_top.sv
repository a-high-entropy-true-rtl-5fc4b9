// trng_top: complete random number generator, TRNG plus Keccak unit.
//
// The TRNG (ring-oscillator noise source, health tests, control unit and
// key shift register) produces N_BITS_KEY-bit raw keys. The conditioning
// input selects how the Keccak unit is used:
//   conditioning = 1  the TRNG's key_ready starts the Keccak unit on the
//                     pad10*1-padded raw key; 24 cycles later the 1600-bit
//                     permuted state is the output key, and key_ready /
//                     trng_intr come from the Keccak unit.
//   conditioning = 0  key_out is the raw key (zero-extended to 1600 bits)
//                     with the TRNG's own key_ready / trng_intr, and the
//                     Keccak unit is free for the host through kec_start,
//                     kec_state_in and kec_state_out (a bare Keccak-f[1600]
//                     permutation of the given state).
// Selecting the output with a multiplexer and handing over the interrupt
// and key_ready follow the document's schematic; the external Keccak port
// set is this design's choice. ack_read always goes to the TRNG control
// unit, which waits for it before producing the next key.
//
// With conditioning, one 1600-bit key needs N_BITS_KEY cycles of raw bits
// plus the 24-cycle permutation: 1600 / (N_BITS_KEY + 24) bits per cycle
// if the host acknowledges at once (1.05 for the default 1500-bit key).
// N_BITS_KEY must exceed 24 so the Keccak unit is idle when a key arrives.
//
// The noise source contains the behavioural ring-oscillator model, so this
// module simulates but is not synthesizable as written. For a build,
// replace ring_oscillator with a technology ring; everything else here
// is plain synchronous logic.
`timescale 1ns / 100fs
module trng_top
  import trng_pkg::*;
#(
  parameter int unsigned N_RO        = 32,
  parameter int unsigned N_INV       = 13,
  parameter int unsigned N_BITS_KEY  = 1500,
  parameter int unsigned N_BIST      = 1,
  parameter int unsigned LATENCY     = 1024,
  parameter int unsigned RCT_C       = 22,
  parameter int unsigned APT_W       = 1024,
  parameter int unsigned APT_C       = 590,
  parameter int unsigned FAIL_THRESH = 3
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          enable,
  input  logic          conditioning,
  input  logic          ack_read,
  output keccak_state_t key_out,
  output logic          key_ready,
  output logic          trng_intr,
  input  logic          kec_start,
  input  keccak_state_t kec_state_in,
  output keccak_state_t kec_state_out,
  output logic          kec_done,
  output logic          kec_busy
);

  logic [N_BITS_KEY-1:0] out_key;
  logic                  trng_key_ready, trng_trng_intr;
  logic                  kec_key_ready, kec_intr;

  trng #(
    .N_RO        (N_RO),
    .N_INV       (N_INV),
    .N_BITS_KEY  (N_BITS_KEY),
    .N_BIST      (N_BIST),
    .LATENCY     (LATENCY),
    .WAIT_CONST  (N_BITS_KEY - 1),
    .RCT_C       (RCT_C),
    .APT_W       (APT_W),
    .APT_C       (APT_C),
    .FAIL_THRESH (FAIL_THRESH)
  ) u_trng (
    .clk, .rst_n,
    .enable    (enable),
    .ack_read  (ack_read),
    .out_key   (out_key),
    .key_ready (trng_key_ready),
    .trng_intr (trng_trng_intr)
  );

  keccak #(.N_BITS_KEY(N_BITS_KEY)) u_keccak (
    .clk, .rst_n,
    .start_i     (conditioning ? trng_key_ready : kec_start),
    .cond_i      (conditioning),
    .msg_i       (out_key),
    .state_i     (kec_state_in),
    .state_o     (kec_state_out),
    .busy_o      (kec_busy),
    .key_ready_o (kec_key_ready),
    .intr_o      (kec_intr)
  );

  assign key_out   = conditioning ? kec_state_out : keccak_state_t'(out_key);
  assign key_ready = conditioning ? kec_key_ready : trng_key_ready;
  assign trng_intr = conditioning ? kec_intr      : trng_trng_intr;
  assign kec_done  = kec_key_ready;

  initial assert (N_BITS_KEY > KECCAK_ROUNDS)
    else $error("trng_top: N_BITS_KEY must exceed the 24-cycle Keccak latency");

endmodule
