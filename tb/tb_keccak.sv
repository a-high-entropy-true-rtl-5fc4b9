// tb_keccak: self-checking test of the iterative Keccak unit.
//  * external-state mode: SHA3-256 of the empty string (one block, the
//    state preloaded with the 0x06 ... 0x80 padding at rate 1088) must give
//    the published digest a7ffc6f8...8434a;
//  * external-state mode with random states against the reference model;
//  * conditioning mode: a random N_BITS_KEY-bit key is padded pad10*1 by
//    the testbench and compared with the reference permutation;
//  * latency: the result pulse comes exactly 24 cycles after the start
//    cycle, and a start while busy is ignored.
`timescale 1ns / 100fs
module tb_keccak;
  import keccak_ref_pkg::*;

  localparam int unsigned NK = 1500;

  logic          clk = 1'b0, rst_n = 1'b0;
  logic          start = 1'b0, cond = 1'b0;
  logic [NK-1:0] msg = '0;
  st1600_t       st_in = '0, st_out, expv;
  logic          busy, kready, intr;
  int checks = 0, failures = 0;

  keccak #(.N_BITS_KEY(NK)) dut (
    .clk, .rst_n, .start_i(start), .cond_i(cond), .msg_i(msg),
    .state_i(st_in), .state_o(st_out), .busy_o(busy),
    .key_ready_o(kready), .intr_o(intr)
  );

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // start one permutation, check its latency, return after the result pulse
  task automatic run_perm(input logic c, input st1600_t s, input logic [NK-1:0] m,
                          input logic poke_busy);
    int cyc;
    @(negedge clk);
    cond = c; st_in = s; msg = m; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    if (poke_busy) begin
      // a second start (with other data) during the run must be ignored
      start = 1'b1; st_in = ~s; msg = ~m;
      @(negedge clk);
      start = 1'b0;
      cyc++;
    end
    while (!kready && cyc < 40) begin
      check(busy === 1'b1, "busy during permutation");
      @(negedge clk);
      cyc++;
    end
    check(cyc == 24, $sformatf("latency %0d cycles, expected 24", cyc));
    check(intr === 1'b1, "interrupt with key_ready");
    @(negedge clk);
    check(kready === 1'b0 && busy === 1'b0, "result pulse lasts one cycle");
  endtask

  initial begin
    st1600_t s, pad;
    logic [NK-1:0] m;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // SHA3-256("")
    s = '0;
    s[7:0] = 8'h06;
    s[1087] = 1'b1;
    run_perm(1'b0, s, '0, 1'b0);
    check(st_out[255:0] === 256'h4a43f8804b0ad882fa493be44dff80f562d661a05647c15166d71ebff8c6ffa7,
          "SHA3-256 of empty string");

    for (int k = 0; k < 6; k++) begin
      s = rand_state();
      run_perm(1'b0, s, '0, k[0]);
      expv = ref_keccak_f(s);
      check(st_out === expv, "external state permutation");
    end

    for (int k = 0; k < 6; k++) begin
      for (int i = 0; i < NK; i += 32) m[i +: 32] = $urandom;
      pad = '0;
      pad[NK-1:0] = m;
      pad[NK] = 1'b1;
      pad[1599] = 1'b1;
      run_perm(1'b1, '0, m, k[0]);
      expv = ref_keccak_f(pad);
      check(st_out === expv, "conditioned key (padded) permutation");
      // result is held after the pulse
      repeat (5) @(negedge clk);
      check(st_out === expv, "result held");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
