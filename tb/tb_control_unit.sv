// tb_control_unit: random enable / ack / error / total-failure stimulus
// against a software model of the six-state diagram, checked every cycle
// (state and all outputs). Also measures that an undisturbed WAIT state
// lasts N_BITS_KEY cycles and BIST lasts N_BIST*LATENCY+1 cycles, and
// that every transition of the diagram was taken at least once.
`timescale 1ns / 100fs
module tb_control_unit;
  import trng_pkg::*;
  localparam int unsigned NK = 12, NB = 2, LAT = 5, WC = NK - 1;

  logic clk = 1'b0, rst_n = 1'b0;
  logic en = 0, ack = 0, err = 0, tf = 0;
  logic dffe, hte, kr, intr;
  cu_state_t st;
  int checks = 0, failures = 0;

  control_unit #(.N_BITS_KEY(NK), .N_BIST(NB), .LATENCY(LAT), .WAIT_CONST(WC)) dut (
    .clk, .rst_n, .enable_i(en), .ack_read_i(ack), .error_i(err), .total_failure_i(tf),
    .dff_enable_o(dffe), .enable_health_test_o(hte), .key_ready_o(kr), .trng_intr_o(intr),
    .state_o(st));

  always #5 clk = ~clk;

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  cu_state_t m = ST_IDLE;
  int cb = 0, cw = 0, dur = 0;
  int cov [string];

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("t=%0t FAIL %s", $time, what); end
  endtask

  // advance the model by one clock with the inputs applied in this cycle
  task automatic model_step();
    cu_state_t n = m;
    case (m)
      ST_IDLE:         if (en) n = ST_BIST;
      ST_BIST:         if (cb == NB*LAT) n = ST_WAIT;
      ST_WAIT:         if (cw == WC) n = ST_ES32;
      ST_ES32:         n = ST_WAIT_FOR_ACK;
      ST_WAIT_FOR_ACK: if (ack) n = ST_WAIT;
      default:         n = m;
    endcase
    if (m inside {ST_BIST, ST_WAIT, ST_ES32, ST_WAIT_FOR_ACK}) begin
      if (tf) n = ST_DEAD;
      else if (err) n = ST_BIST;
    end
    cov[$sformatf("%s->%s", m.name(), n.name())] = 1;
    // undisturbed durations, measured on the model's own state changes
    if (n != m || (n == m && (tf || err) && m != ST_IDLE && m != ST_DEAD)) begin
      if (m == ST_WAIT && n == ST_ES32) chk(dur + 1 == NK, $sformatf("WAIT lasted %0d", dur + 1));
      if (m == ST_BIST && n == ST_WAIT) chk(dur + 1 == NB*LAT + 1, $sformatf("BIST lasted %0d", dur + 1));
      dur = 0;
    end else dur++;
    cb = (n == ST_BIST && m == ST_BIST && !err) ? cb + 1 : 0;
    cw = (n == ST_WAIT && m == ST_WAIT) ? cw + 1 : 0;
    m = n;
  endtask

  initial begin
    int mode;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int run = 0; run < 60; run++) begin
      mode = run % 4;   // 0: clean, 1: some errors, 2: errors + failure, 3: idle start
      for (int c = 0; c < 300; c++) begin
        en  = (mode == 3) ? (($urandom % 20) == 0) : 1'b1;
        ack = (($urandom % 4) == 0);
        err = (mode >= 1) && (($urandom % 40) == 0);
        tf  = (mode == 2) && (c > 150) && (($urandom % 30) == 0);
        @(posedge clk);
        model_step();
        @(negedge clk);
        chk(st == m, $sformatf("state %s expected %s", st.name(), m.name()));
        chk(dffe == (m == ST_BIST || m == ST_WAIT), "dff_enable");
        chk(hte == dffe, "enable_health_test");
        chk(kr == (m == ST_ES32) && intr == (m == ST_ES32), "key_ready / trng_intr");
      end
      // reboot
      rst_n = 0; en = 0; err = 0; tf = 0; ack = 0;
      @(negedge clk);
      rst_n = 1; m = ST_IDLE; cb = 0; cw = 0; dur = 0;
      chk(st == ST_IDLE, "reset to IDLE");
    end
    foreach (cov[k]) ;
    begin
      automatic string need [] = '{"ST_IDLE->ST_IDLE", "ST_IDLE->ST_BIST", "ST_BIST->ST_BIST",
        "ST_BIST->ST_WAIT", "ST_WAIT->ST_WAIT", "ST_WAIT->ST_ES32", "ST_ES32->ST_WAIT_FOR_ACK",
        "ST_WAIT_FOR_ACK->ST_WAIT_FOR_ACK", "ST_WAIT_FOR_ACK->ST_WAIT", "ST_WAIT->ST_BIST",
        "ST_ES32->ST_BIST", "ST_WAIT_FOR_ACK->ST_BIST", "ST_BIST->ST_DEAD", "ST_WAIT->ST_DEAD",
        "ST_DEAD->ST_DEAD"};
      foreach (need[i]) chk(cov.exists(need[i]), {"transition never taken: ", need[i]});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
