// trng: the true random number generator without its conditioning stage.
//
// The ring-oscillator noise source produces one raw bit per enabled clock.
// Each raw bit goes both to the health test and into the key shift
// register. The control unit enables the noise-source flip-flops and the
// shift register (dff_enable) and the health test (enable_health_test);
// it reacts to the health test's error and total_failure outputs. After a
// warm-up of N_BIST*LATENCY+1 cycles the control unit lets the register
// fill for N_BITS_KEY cycles (WAIT_CONST+1), then raises key_ready and
// trng_intr for one cycle and holds out_key until ack_read. The wiring
// follows the document's schematic; the default thresholds and the
// warm-up length are this design's choices (see the sub-blocks).
//
// Throughput: without waiting for the host, one N_BITS_KEY-bit key every
// N_BITS_KEY+1 cycles plus the acknowledge latency, i.e. about 1 bit per
// clock.
//
// The noise source contains the behavioural ring-oscillator model, so this
// module simulates but is not synthesizable as written. For a build,
// replace ring_oscillator with a technology ring; everything else here
// is plain synchronous logic.
//
// Lint note: Verilator flags rst_n as used both asynchronously and
// synchronously. The synchronous use is the assertion's disable iff
// clause, not logic; every flip-flop uses rst_n as an asynchronous reset.
`timescale 1ns / 100fs
module trng
  import trng_pkg::*;
#(
  parameter int unsigned N_RO        = 32,
  parameter int unsigned N_INV       = 13,
  parameter int unsigned N_BITS_KEY  = 1500,
  parameter int unsigned N_BIST      = 1,
  parameter int unsigned LATENCY     = 1024,
  parameter int unsigned WAIT_CONST  = N_BITS_KEY - 1,
  parameter int unsigned RCT_C       = 22,
  parameter int unsigned APT_W       = 1024,
  parameter int unsigned APT_C       = 590,
  parameter int unsigned FAIL_THRESH = 3
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  enable,
  input  logic                  ack_read,
  output logic [N_BITS_KEY-1:0] out_key,
  output logic                  key_ready,
  output logic                  trng_intr
);

  logic      dff_enable, enable_health_test, rnd_bit, error, total_failure;
  cu_state_t cu_state;

  control_unit #(
    .N_BITS_KEY (N_BITS_KEY),
    .N_BIST     (N_BIST),
    .LATENCY    (LATENCY),
    .WAIT_CONST (WAIT_CONST)
  ) u_cu (
    .clk, .rst_n,
    .enable_i             (enable),
    .ack_read_i           (ack_read),
    .error_i              (error),
    .total_failure_i      (total_failure),
    .dff_enable_o         (dff_enable),
    .enable_health_test_o (enable_health_test),
    .key_ready_o          (key_ready),
    .trng_intr_o          (trng_intr),
    .state_o              (cu_state)
  );

  noise_source #(.N_RO(N_RO), .N_INV(N_INV)) u_noise (
    .clk, .rst_n,
    .enable_i     (enable),
    .dff_enable_i (dff_enable),
    .rnd_bit_o    (rnd_bit)
  );

  health_test #(
    .RCT_C       (RCT_C),
    .APT_W       (APT_W),
    .APT_C       (APT_C),
    .FAIL_THRESH (FAIL_THRESH)
  ) u_health (
    .clk, .rst_n,
    .enable_health_test_i (enable_health_test),
    .rnd_bit_i            (rnd_bit),
    .error_o              (error),
    .total_failure_o      (total_failure)
  );

  key_shift_reg #(.N_BITS_KEY(N_BITS_KEY)) u_shift (
    .clk, .rst_n,
    .shift_en_i (dff_enable),
    .rnd_bit_i  (rnd_bit),
    .out_key_o  (out_key)
  );

  // the key must not move between key_ready and the acknowledge
  a_key_frozen: assert property (@(posedge clk) disable iff (!rst_n)
    cu_state == ST_WAIT_FOR_ACK |=> $stable(out_key));

endmodule
