// health_test: run-time monitor of the raw noise-source bitstream.
//
// Every raw bit accepted while enable_health_test_i is high goes through a
// repetition count test (stuck-at detection) and an adaptive proportion
// test (bias detection over 1024-sample windows). Either test's error pulse
// is passed to the control unit on error_o, which sends the generator back
// to its warm-up phase. An auxiliary counter tracks consecutive errors; once
// it reaches FAIL_THRESH, total_failure_o is raised and stays high until
// reset, which the control unit turns into its unrecoverable state.
//
// The two tests and the consecutive-error counter with a configurable
// threshold follow the document, as does FAIL_THRESH = 3 (its example of a
// strict policy). What counts as "consecutive" is this design's choice:
// the counter is cleared when one full adaptive-proportion window passes
// with no error from either test, so errors separated by less than a clean
// window accumulate. While enable_health_test_i is low no sample is taken
// and all state is held.
//
// Timing: error_o is a one-cycle pulse one cycle after the offending
// sample; total_failure_o rises one cycle after the error pulse that
// reaches the threshold.
`timescale 1ns / 100fs
module health_test #(
  parameter int unsigned RCT_C       = 22,
  parameter int unsigned APT_W       = 1024,
  parameter int unsigned APT_C       = 590,
  parameter int unsigned FAIL_THRESH = 3
) (
  input  logic clk,
  input  logic rst_n,
  input  logic enable_health_test_i,
  input  logic rnd_bit_i,
  output logic error_o,
  output logic total_failure_o
);

  localparam int unsigned CW = $clog2(FAIL_THRESH + 1);

  logic          rct_err, apt_err, apt_wend;
  logic          win_dirty_q;
  logic [CW-1:0] cnt_q;

  repetition_count_test #(.C(RCT_C)) u_rct (
    .clk, .rst_n,
    .sample_en (enable_health_test_i),
    .bit_i     (rnd_bit_i),
    .error_o   (rct_err)
  );

  adaptive_proportion_test #(.W(APT_W), .C(APT_C)) u_apt (
    .clk, .rst_n,
    .sample_en    (enable_health_test_i),
    .bit_i        (rnd_bit_i),
    .error_o      (apt_err),
    .window_end_o (apt_wend)
  );

  assign error_o = rct_err | apt_err;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q           <= '0;
      win_dirty_q     <= 1'b0;
      total_failure_o <= 1'b0;
    end else begin
      if (error_o) begin
        if (cnt_q != CW'(FAIL_THRESH)) cnt_q <= cnt_q + CW'(1);
        if (cnt_q + CW'(1) >= CW'(FAIL_THRESH)) total_failure_o <= 1'b1;
      end else if (apt_wend && !win_dirty_q) begin
        cnt_q <= '0;
      end
      // a window is dirty if any error was seen since its start
      if (apt_wend) win_dirty_q <= 1'b0;
      else if (error_o) win_dirty_q <= 1'b1;
    end
  end

  initial assert (FAIL_THRESH >= 1) else $error("health_test: FAIL_THRESH must be at least 1");

endmodule
