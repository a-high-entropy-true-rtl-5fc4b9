// conditioned_key_run: testbench helper. Runs one complete generator with
// key length NK in conditioned mode, acknowledges every result at once,
// and for N_KEYS keys checks each 1600-bit key against the reference
// Keccak-f[1600] of the padded raw key and measures the cycles between
// keys. Reports its counts and the measured output rate.
`timescale 1ns / 100fs
module conditioned_key_run #(
  parameter int unsigned NK     = 320,
  parameter int unsigned N_KEYS = 4
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures,
  output int   period
);
  import keccak_ref_pkg::*;

  logic    enable = 0, ack = 0;
  st1600_t key_out, kso;
  logic    kr, intr, kd, kb;

  trng_top #(.N_BITS_KEY(NK)) dut (
    .clk, .rst_n, .enable, .conditioning(1'b1), .ack_read(ack),
    .key_out, .key_ready(kr), .trng_intr(intr),
    .kec_start(1'b0), .kec_state_in('0), .kec_state_out(kso), .kec_done(kd), .kec_busy(kb));

  int cyc = 0, last = -1;
  always @(posedge clk) cyc++;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("NK=%0d t=%0t FAIL %s", NK, $time, what); end
  endtask

  initial begin
    st1600_t p;
    int w;
    logic [NK-1:0] raw;
    done = 0; checks = 0; failures = 0; period = 0;
    @(posedge rst_n);
    @(negedge clk);
    enable = 1;
    for (int k = 0; k < int'(N_KEYS); k++) begin
      w = 0;
      while (!dut.trng_key_ready && w < 5000) begin @(negedge clk); w++; end
      raw = dut.out_key;
      @(negedge clk);
      w = 0;
      while (!kr && w < 40) begin @(negedge clk); w++; end
      p = '0;
      p[NK-1:0] = raw;
      p[NK] = 1'b1;
      p[1599] = 1'b1;
      chk(kr === 1'b1 && key_out === ref_keccak_f(p), $sformatf("conditioned key %0d", k));
      // cycles between successive results
      if (last >= 0) begin
        period = cyc - last;
        chk(period == int'(NK) + 25, $sformatf("period %0d, expected %0d", period, NK + 25));
      end
      last = cyc;
      ack = 1;
      @(negedge clk);
      ack = 0;
    end
    done = 1;
  end
endmodule
