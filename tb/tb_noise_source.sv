// tb_noise_source: runs the full 32 x 13 noise source at a 150 MHz sampling
// clock. Every cycle the raw bit is compared with the XOR of the oscillator
// levels the testbench itself saw two enabled edges earlier; the flip-flop
// enable is toggled at random to check that the bit holds when disabled.
// Over the enabled samples it also checks the bit statistics: proportion
// of ones near one half and no run as long as the repetition-count cutoff
// (22). With the oscillators stopped the bit must settle to 0.
`timescale 1ns / 100fs
module tb_noise_source;
  localparam int unsigned N_RO = 32;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, dffe = 1'b0, rb;
  int checks = 0, failures = 0;

  noise_source dut (.clk, .rst_n, .enable_i(en), .dff_enable_i(dffe), .rnd_bit_o(rb));

  always #3.333 clk = ~clk;   // 150 MHz

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // independent pipeline model, sampled with the edge
  logic s1 = 0, s2 = 0;
  always @(posedge clk) begin
    if (dffe) begin
      s2 <= s1;
      s1 <= ^dut.ro;
    end
  end

  initial begin
    automatic int ones = 0, n = 0, run = 0, maxrun = 0;
    automatic logic prev = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    en = 1;
    repeat (4) @(negedge clk);
    dffe = 1;
    repeat (4) @(negedge clk);
    for (int c = 0; c < 40000; c++) begin
      logic held;
      held = rb;
      dffe = (($urandom % 8) != 0);
      @(negedge clk);
      checks++;
      if (rb !== s2) begin failures++; if (failures < 10) $display("cycle %0d: bit %b model %b", c, rb, s2); end
      if (!dffe) begin
        checks++;
        if (rb !== held) begin failures++; $display("bit changed while disabled"); end
      end else begin
        n++;
        ones += rb;
        run = (rb == prev) ? run + 1 : 1;
        prev = rb;
        if (run > maxrun) maxrun = run;
      end
    end
    $display("samples %0d ones %0d longest run %0d", n, ones, maxrun);
    checks++;
    if (ones < n * 48 / 100 || ones > n * 52 / 100) begin failures++; $display("biased output"); end
    checks++;
    if (maxrun >= 22) begin failures++; $display("run reaches the repetition cutoff"); end
    // stop the rings
    en = 0;
    dffe = 1;
    repeat (4) @(negedge clk);
    checks++;
    if (rb !== 1'b0 || dut.ro !== '0) begin failures++; $display("rings did not stop"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
