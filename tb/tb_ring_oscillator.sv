// tb_ring_oscillator: measures 3000 periods of one 13-inverter ring.
// With inverter delays of 275..282 ps the mean period must lie in
// 2*13*275 .. 2*13*282 ps, and the period jitter (13 inverters x 2 half
// periods, 30 ps each) must have a standard deviation near
// sqrt(26)*30 = 153 ps. Also checks that the ring rests at 0 and makes no
// edge while disabled, and restarts when enabled again.
`timescale 1ps / 100fs
module tb_ring_oscillator;
  logic en = 1'b0, ro;
  int checks = 0, failures = 0;

  ring_oscillator #(.N_INV(13), .SEED(7)) dut (.enable(en), .ro_out(ro));

  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int edges = 0;
  always @(ro) edges++;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    realtime t0, t1;
    real sum, sum2, p, mean, sd;
    #10;
    edges = 0;
    #10_000;
    chk(ro === 1'b0 && edges == 0, "quiet while disabled");
    en = 1'b1;
    @(posedge ro);
    t0 = $realtime;
    sum = 0; sum2 = 0;
    for (int i = 0; i < 3000; i++) begin
      @(posedge ro);
      t1 = $realtime;
      p = t1 - t0;
      t0 = t1;
      sum += p;
      sum2 += p * p;
      chk(p > 6000.0 && p < 8500.0, $sformatf("period %0.1f ps out of range", p));
    end
    mean = sum / 3000.0;
    sd = (sum2 / 3000.0 - mean * mean) ** 0.5;
    $display("mean period %0.1f ps, sd %0.1f ps", mean, sd);
    chk(mean >= 2 * 13 * 275.0 && mean <= 2 * 13 * 282.0, "mean period");
    chk(sd > 120.0 && sd < 190.0, "period jitter");
    en = 1'b0;
    #5000;
    edges = 0;
    #50_000;
    chk(ro === 1'b0 && edges == 0, "stops when disabled");
    en = 1'b1;
    #50_000;
    chk(edges > 10, "restarts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
