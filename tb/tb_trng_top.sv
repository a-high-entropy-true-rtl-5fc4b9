// tb_trng_top: end-to-end test of the complete generator at its default
// size (32 rings of 13 inverters, 1500-bit raw key, 1024-cycle warm-up,
// 1600-bit Keccak) with a 150 MHz clock.
//
// The testbench predicts every raw bit on its own: it XORs the ring
// levels at each enabled clock edge and delays that by the two flip-flop
// stages, then shifts the prediction into its own copy of the key. It
// checks:
//   * raw mode: each key, its zero extension to 1600 bits, the exact
//     start-up latency (1 + 1025 + 1500 cycles) and the key period after
//     an acknowledge (1501 cycles); the key holds while the host stalls;
//   * the Keccak unit used by the host in raw mode (bare permutation,
//     compared with a reference model, 24-cycle latency);
//   * conditioned mode: key_out equals Keccak-f[1600] of the pad10*1
//     padded raw key, 24 cycles after the TRNG's own key_ready, and the
//     key period with an immediate acknowledge is 1525 cycles;
//   * a short stuck-at burst on the raw bit: one health error, return to
//     warm-up, then correct keys again;
//   * a permanent stuck-at: total failure, DEAD state, no more keys until
//     a reset, after which keys come again.
// Each of these mechanisms is counted and must have happened.
`timescale 1ns / 100fs
module tb_trng_top;
  import keccak_ref_pkg::*;
  import trng_pkg::*;

  localparam int unsigned NK = 1500;
  localparam int unsigned T_STARTUP = 1 + 1025 + NK;

  logic    clk = 1'b0, rst_n = 1'b0;
  logic    enable = 0, conditioning = 0, ack_read = 0, kec_start = 0;
  st1600_t key_out, kec_state_in = '0, kec_state_out;
  logic    key_ready, trng_intr, kec_done, kec_busy;
  int checks = 0, failures = 0;

  trng_top dut (
    .clk, .rst_n, .enable, .conditioning, .ack_read,
    .key_out, .key_ready, .trng_intr,
    .kec_start, .kec_state_in, .kec_state_out, .kec_done, .kec_busy);

  always #3.333 clk = ~clk;

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("t=%0t FAIL %s", $time, what); end
  endtask

  // ---- independent raw-bit and key prediction ----
  logic          s1, s2, forced = 0, force_val = 0;
  logic [NK-1:0] mkey;
  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1 <= 0; s2 <= 0; mkey <= '0;
    end else if (dut.u_trng.dff_enable) begin
      s2   <= s1;
      s1   <= ^dut.u_trng.u_noise.ro;
      mkey <= {mkey[NK-2:0], forced ? force_val : s2};
    end
  end

  // ---- cycle counter and mechanism counters ----
  longint cyc = 0;
  always @(posedge clk) cyc++;
  int n_raw_keys = 0, n_cond_keys = 0, n_ext_keccak = 0, n_stall = 0;
  int n_health_err = 0, n_dead = 0, n_mode_switch = 0, n_reboot = 0;
  always @(posedge clk) if (rst_n && dut.u_trng.error) n_health_err++;

  function automatic st1600_t pad_key(input logic [NK-1:0] k);
    st1600_t p = '0;
    p[NK-1:0] = k;
    p[NK] = 1'b1;
    p[1599] = 1'b1;
    return p;
  endfunction

  // wait for key_ready, return the number of cycles waited
  task automatic wait_key(input int limit, output int waited);
    waited = 0;
    while (!key_ready && waited < limit) begin
      @(negedge clk);
      waited++;
    end
  endtask

  task automatic ack_now();
    ack_read = 1;
    @(negedge clk);
    ack_read = 0;
  endtask

  // host use of the Keccak unit while the TRNG runs in raw mode
  task automatic ext_keccak();
    st1600_t s, e;
    int w;
    s = rand_state();
    kec_state_in = s;
    kec_start = 1;
    @(negedge clk);
    kec_start = 0;
    w = 1;
    while (!kec_done && w < 40) begin @(negedge clk); w++; end
    e = ref_keccak_f(s);
    chk(w == 24, $sformatf("external Keccak latency %0d", w));
    chk(kec_state_out === e, "external Keccak permutation");
    chk(key_ready === 1'b0 || dut.trng_key_ready, "host Keccak does not raise key_ready in raw mode");
    n_ext_keccak++;
  endtask

  initial begin
    int w;
    st1600_t exp_key;
    logic [NK-1:0] raw_at_es32;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // ---------- raw mode ----------
    enable = 1;
    wait_key(T_STARTUP + 10, w);
    chk(w == T_STARTUP, $sformatf("start-up latency %0d, expected %0d", w, T_STARTUP));
    chk(trng_intr === 1'b1, "interrupt with key_ready");
    chk(key_out === st1600_t'(mkey), "raw key 1");
    n_raw_keys++;
    // host stalls 200 cycles; key must hold, no new key_ready
    @(negedge clk);
    exp_key = key_out;
    for (int i = 0; i < 200; i++) begin
      chk(key_ready === 1'b0 && key_out === exp_key, "key held while waiting for ack");
      if (i == 20) ext_keccak();
      @(negedge clk);
    end
    n_stall++;
    ack_now();
    wait_key(NK + 10, w);
    chk(w == NK, $sformatf("key period after ack %0d, expected %0d", w + 1, NK + 1));
    chk(key_out === st1600_t'(mkey), "raw key 2");
    n_raw_keys++;

    // ---------- switch to conditioned mode ----------
    // an acknowledge is taken from the cycle after key_ready on
    @(negedge clk);
    conditioning = 1;
    n_mode_switch++;
    ack_now();
    for (int k = 0; k < 3; k++) begin
      // wait for the TRNG's own key_ready, then the Keccak result
      w = 0;
      while (!dut.trng_key_ready && w < NK + 40) begin @(negedge clk); w++; end
      raw_at_es32 = mkey;
      chk(dut.u_trng.out_key === mkey, "raw key handed to Keccak");
      // with the host acknowledging each result at once, one conditioned
      // key per 1 (ES32) + 24 (Keccak) + NK cycles
      if (k > 0) chk(w == NK, $sformatf("conditioned key period %0d, expected %0d", w + 25, NK + 25));
      @(negedge clk);
      wait_key(40, w);
      chk(w == 23, $sformatf("Keccak latency %0d, expected 24", w + 1));
      exp_key = ref_keccak_f(pad_key(raw_at_es32));
      chk(key_out === exp_key, "conditioned key");
      chk(trng_intr === 1'b1, "conditioned interrupt");
      n_cond_keys++;
      ack_now();
    end

    // ---------- transient stuck-at: one health error, back to BIST ----------
    w = 0;
    while (dut.u_trng.cu_state != ST_WAIT && w < 100) begin @(negedge clk); w++; end
    repeat (100) @(negedge clk);
    begin
      automatic int before_err = n_health_err;
      forced = 1; force_val = 1;
      force dut.u_trng.rnd_bit = 1'b1;
      repeat (30) @(negedge clk);
      release dut.u_trng.rnd_bit;
      forced = 0;
      chk(n_health_err > before_err, "stuck burst raised a health error");
      chk(dut.u_trng.cu_state == ST_BIST, "health error sent the controller to BIST");
      chk(dut.u_trng.total_failure === 1'b0, "one burst is not a total failure");
    end
    wait_key(T_STARTUP + 100, w);
    chk(key_ready === 1'b1, "keys resume after a health error");
    exp_key = ref_keccak_f(pad_key(dut.u_trng.out_key));
    chk(key_out === exp_key && dut.u_trng.out_key === mkey, "key after recovery");
    n_cond_keys++;
    ack_now();

    // ---------- permanent stuck-at: total failure ----------
    forced = 1; force_val = 0;
    force dut.u_trng.rnd_bit = 1'b0;
    w = 0;
    while (dut.u_trng.cu_state != ST_DEAD && w < 3000) begin @(negedge clk); w++; end
    chk(dut.u_trng.cu_state == ST_DEAD, "stuck source ends in DEAD");
    if (dut.u_trng.cu_state == ST_DEAD) n_dead++;
    release dut.u_trng.rnd_bit;
    forced = 0;
    for (int i = 0; i < 3000; i++) begin
      chk(key_ready === 1'b0, "no key once DEAD");
      @(negedge clk);
    end
    chk(dut.u_trng.cu_state == ST_DEAD, "DEAD is kept");

    // ---------- reboot ----------
    rst_n = 0; enable = 0; conditioning = 0;
    @(negedge clk);
    rst_n = 1;
    n_reboot++;
    n_mode_switch++;
    chk(dut.u_trng.cu_state == ST_IDLE, "reset returns to IDLE");
    enable = 1;
    wait_key(T_STARTUP + 10, w);
    chk(w == T_STARTUP, "start-up latency after reboot");
    chk(key_out === st1600_t'(mkey), "raw key after reboot");
    n_raw_keys++;

    $display("raw keys %0d, conditioned keys %0d, host Keccak runs %0d, ack stalls %0d",
             n_raw_keys, n_cond_keys, n_ext_keccak, n_stall);
    $display("health errors %0d, total failures %0d, mode switches %0d, reboots %0d",
             n_health_err, n_dead, n_mode_switch, n_reboot);
    chk(n_raw_keys > 0 && n_cond_keys > 0 && n_ext_keccak > 0 && n_stall > 0 &&
        n_health_err > 0 && n_dead > 0 && n_mode_switch > 0 && n_reboot > 0,
        "every mechanism exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
