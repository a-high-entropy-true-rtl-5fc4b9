// tb_keccak_round: checks one combinational Keccak round against the
// reference model for every round index and random states, plus the
// known first lane of Keccak-f[1600] applied to the all-zero state.
`timescale 1ns / 100fs
module tb_keccak_round;
  import keccak_ref_pkg::*;

  st1600_t    s_in, s_out, expv;
  logic [4:0] rnd;
  int checks = 0, failures = 0;

  keccak_round dut (.state_i(s_in), .round_i(rnd), .state_o(s_out));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 24; r++) begin
      for (int k = 0; k < 4; k++) begin
        s_in = (k == 0) ? '0 : rand_state();
        rnd  = 5'(r);
        #1;
        expv = ref_round(s_in, r);
        checks++;
        if (s_out !== expv) begin
          failures++;
          $display("round %0d vector %0d mismatch", r, k);
        end
      end
    end
    // chain all 24 rounds on the zero state: first lane is F1258F7940E1DDE7
    s_in = '0;
    for (int r = 0; r < 24; r++) begin
      rnd = 5'(r);
      #1;
      s_in = s_out;
    end
    checks++;
    if (s_in[63:0] !== 64'hF1258F7940E1DDE7) begin
      failures++;
      $display("Keccak-f(0) lane 0 = %h", s_in[63:0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
