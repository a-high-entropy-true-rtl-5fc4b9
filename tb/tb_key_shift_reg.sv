// tb_key_shift_reg: shifts random bits with random enable gaps into a
// 1500-bit register and compares it every cycle with a model register;
// checks that N_BITS_KEY enabled cycles replace every bit and that the key
// holds while the enable is low.
`timescale 1ns / 100fs
module tb_key_shift_reg;
  localparam int unsigned NK = 1500;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, b = 1'b0;
  logic [NK-1:0] key, model;
  int checks = 0, failures = 0;

  key_shift_reg #(.N_BITS_KEY(NK)) dut (.clk, .rst_n, .shift_en_i(en), .rnd_bit_i(b), .out_key_o(key));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NK-1:0] stream;
    model = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    checks++;
    if (key !== '0) begin failures++; $display("reset value"); end
    for (int c = 0; c < 5000; c++) begin
      en = (($urandom % 3) != 0);
      b  = 1'($urandom);
      if (en) model = {model[NK-2:0], b};
      @(negedge clk);
      checks++;
      if (key !== model) begin failures++; $display("cycle %0d mismatch", c); end
    end
    // a full key: the first bit in ends at the MSB
    for (int i = 0; i < NK; i += 32) stream[i +: 32] = $urandom;
    for (int i = NK - 1; i >= 0; i--) begin
      en = 1; b = stream[i];
      @(negedge clk);
    end
    en = 0;
    checks++;
    if (key !== stream) begin failures++; $display("full key mismatch"); end
    repeat (10) @(negedge clk);
    checks++;
    if (key !== stream) begin failures++; $display("key not held"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
