// control_unit: six-state controller of the TRNG.
//
//   IDLE          waits for enable_i.
//   BIST          warm-up: noise-source flip-flops and health tests run, no
//                 key is produced. Lasts until cnt_BIST = N_BIST*LATENCY.
//   WAIT          a key is shifted in, one raw bit per cycle, until
//                 cnt_WAIT = WAIT_CONST.
//   ES32          one cycle: key_ready_o and trng_intr_o are raised.
//   WAIT_FOR_ACK  the key is held until ack_read_i.
//   DEAD          entered on total_failure_i; left only through reset.
// An error_i pulse in BIST, WAIT, ES32 or WAIT_FOR_ACK sends the FSM back
// to BIST (restarting the warm-up); total_failure_i in any of those states
// has priority and goes to DEAD. States, transitions, counter names and
// the N*latency / WAIT_CONST limits follow the document's state diagram.
//
// This design's choices: dff_enable_o (noise-source and shift-register
// enable) is high in BIST and WAIT only, so the key register is frozen
// from ES32 until the acknowledge; enable_health_test_o equals
// dff_enable_o so that every raw bit is tested exactly once; the counters
// clear on entry to their state; an error during BIST restarts the
// warm-up count (the diagram draws no error arrow out of BIST); enable_i
// is only looked at in IDLE.
// Defaults: LATENCY = 1024 (one adaptive-proportion window), N_BIST = 1,
// WAIT_CONST = N_BITS_KEY - 1 so WAIT lasts exactly N_BITS_KEY cycles
// and every bit of the key is new.
//
// Timing: all outputs are decoded from the registered state (Moore).
//
// Lint note: Verilator flags rst_n as used both asynchronously and
// synchronously. The synchronous use is the assertion's disable iff
// clause, not logic; every flip-flop uses rst_n as an asynchronous reset.
`timescale 1ns / 100fs
module control_unit
  import trng_pkg::*;
#(
  parameter int unsigned N_BITS_KEY = 1500,
  parameter int unsigned N_BIST     = 1,
  parameter int unsigned LATENCY    = 1024,
  parameter int unsigned WAIT_CONST = N_BITS_KEY - 1
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      enable_i,
  input  logic      ack_read_i,
  input  logic      error_i,
  input  logic      total_failure_i,
  output logic      dff_enable_o,
  output logic      enable_health_test_o,
  output logic      key_ready_o,
  output logic      trng_intr_o,
  output cu_state_t state_o
);

  localparam int unsigned BIST_CYCLES = N_BIST * LATENCY;
  localparam int unsigned CW = $clog2((BIST_CYCLES > WAIT_CONST ? BIST_CYCLES : WAIT_CONST) + 1);

  cu_state_t     state_q, state_d;
  logic [CW-1:0] cnt_bist_q, cnt_wait_q;

  always_comb begin
    state_d = state_q;
    unique case (state_q)
      ST_IDLE:         if (enable_i) state_d = ST_BIST;
      ST_BIST:         if (cnt_bist_q == CW'(BIST_CYCLES)) state_d = ST_WAIT;
      ST_WAIT:         if (cnt_wait_q == CW'(WAIT_CONST)) state_d = ST_ES32;
      ST_ES32:         state_d = ST_WAIT_FOR_ACK;
      ST_WAIT_FOR_ACK: if (ack_read_i) state_d = ST_WAIT;
      ST_DEAD:         state_d = ST_DEAD;
      default:         state_d = ST_IDLE;
    endcase
    if (state_q inside {ST_BIST, ST_WAIT, ST_ES32, ST_WAIT_FOR_ACK}) begin
      if (total_failure_i)  state_d = ST_DEAD;
      else if (error_i)     state_d = ST_BIST;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= ST_IDLE;
      cnt_bist_q <= '0;
      cnt_wait_q <= '0;
    end else begin
      state_q <= state_d;
      // each counter runs while its state lasts and clears on every entry
      if (state_d == ST_BIST && state_q == ST_BIST && !error_i) cnt_bist_q <= cnt_bist_q + CW'(1);
      else                                                      cnt_bist_q <= '0;
      if (state_d == ST_WAIT && state_q == ST_WAIT)             cnt_wait_q <= cnt_wait_q + CW'(1);
      else                                                      cnt_wait_q <= '0;
    end
  end

  assign dff_enable_o         = (state_q == ST_BIST) || (state_q == ST_WAIT);
  assign enable_health_test_o = dff_enable_o;
  assign key_ready_o          = (state_q == ST_ES32);
  assign trng_intr_o          = (state_q == ST_ES32);
  assign state_o              = state_q;

  // DEAD is absorbing until reset
  property p_dead_stays;
    @(posedge clk) disable iff (!rst_n) state_q == ST_DEAD |=> state_q == ST_DEAD;
  endproperty
  a_dead_stays: assert property (p_dead_stays);

  initial assert (WAIT_CONST >= 1 && BIST_CYCLES >= 1)
    else $error("control_unit: WAIT_CONST and N_BIST*LATENCY must be at least 1");

endmodule
