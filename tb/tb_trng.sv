// tb_trng: the TRNG without conditioning, at a reduced size (64-bit key,
// warm-up of 2 x 16 cycles) so that many keys fit in the run. The
// testbench predicts each raw bit from the ring levels at the enabled
// clock edges and keeps its own copy of the key. It checks the start-up
// latency (1 + 33 + 64 cycles), every key, the key period after an
// acknowledge given after a random delay (65 cycles plus the delay), that
// the key holds until the acknowledge, that a short stuck-at burst sends
// the controller back to warm-up and keys resume, and that a permanent
// stuck-at ends in the DEAD state with no further keys.
`timescale 1ns / 100fs
module tb_trng;
  import trng_pkg::*;

  localparam int unsigned NK = 64, NB = 2, LAT = 16;
  localparam int unsigned T_STARTUP = 1 + NB * LAT + 1 + NK;

  logic clk = 1'b0, rst_n = 1'b0, enable = 0, ack = 0;
  logic [NK-1:0] key;
  logic kr, intr;
  int checks = 0, failures = 0;

  trng #(.N_BITS_KEY(NK), .N_BIST(NB), .LATENCY(LAT)) dut (
    .clk, .rst_n, .enable, .ack_read(ack), .out_key(key), .key_ready(kr), .trng_intr(intr));

  always #3.333 clk = ~clk;

  initial begin
    #2_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("t=%0t FAIL %s", $time, what); end
  endtask

  logic          s1, s2, forced = 0, force_val = 0;
  logic [NK-1:0] mkey;
  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1 <= 0; s2 <= 0; mkey <= '0;
    end else if (dut.dff_enable) begin
      s2   <= s1;
      s1   <= ^dut.u_noise.ro;
      mkey <= {mkey[NK-2:0], forced ? force_val : s2};
    end
  end

  task automatic wait_key(input int limit, output int waited);
    waited = 0;
    while (!kr && waited < limit) begin @(negedge clk); waited++; end
  endtask

  initial begin
    int w, d;
    logic [NK-1:0] held;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    enable = 1;
    wait_key(T_STARTUP + 10, w);
    chk(w == T_STARTUP, $sformatf("start-up latency %0d, expected %0d", w, T_STARTUP));
    for (int k = 0; k < 40; k++) begin
      chk(kr && intr, "key_ready with interrupt");
      chk(key === mkey, $sformatf("key %0d", k));
      held = key;
      d = 1 + ($urandom % 20);
      for (int i = 0; i < d; i++) begin
        @(negedge clk);
        chk(!kr && key === held, "key held until acknowledge");
      end
      ack = 1;
      @(negedge clk);
      ack = 0;
      wait_key(NK + 10, w);
      chk(w == NK, $sformatf("key period %0d after ack, expected %0d", w, NK));
    end
    // short burst: one error, back to BIST, keys resume
    @(negedge clk);
    ack = 1;
    @(negedge clk);
    ack = 0;
    repeat (10) @(negedge clk);
    forced = 1; force_val = 1;
    force dut.rnd_bit = 1'b1;
    repeat (30) @(negedge clk);
    release dut.rnd_bit;
    forced = 0;
    chk(dut.cu_state == ST_BIST, "back to BIST after a health error");
    wait_key(T_STARTUP + 100, w);
    chk(kr === 1'b1 && key === mkey, "key after recovery");
    @(negedge clk);
    ack = 1;
    @(negedge clk);
    ack = 0;
    // permanent stuck-at
    forced = 1; force_val = 0;
    force dut.rnd_bit = 1'b0;
    repeat (200) @(negedge clk);
    chk(dut.cu_state == ST_DEAD, "DEAD after persistent errors");
    release dut.rnd_bit;
    forced = 0;
    for (int i = 0; i < 500; i++) begin
      chk(!kr, "no key when DEAD");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
