// keccak_round: one round of the Keccak-f[1600] permutation, purely
// combinational.
//
// The five steps are applied in order: theta (XOR of each bit with the
// parities of two neighbouring columns), rho (rotate every lane by its
// fixed offset), pi (move lane (x,y) to (y, 2x+3y)), chi (the non-linear
// a ^ (~b & c) along each row) and iota (XOR the round constant into
// lane (0,0)). Rotation offsets and round constants come from trng_pkg,
// where they are generated from their defining formulas.
//
// Interface: state_i is the 1600-bit state (lane (x,y) at bits
// 64*(x+5y) +: 64), round_i selects the round constant (0..23),
// state_o is the state after the round. No clock; the caller registers.
`timescale 1ns / 100fs
module keccak_round
  import trng_pkg::*;
(
  input  keccak_state_t state_i,
  input  logic [4:0]    round_i,
  output keccak_state_t state_o
);

  lane_t a   [KECCAK_LANES];
  lane_t b   [KECCAK_LANES];
  lane_t c   [5];
  lane_t d   [5];
  lane_t rc;

  always_comb begin
    for (int l = 0; l < int'(KECCAK_LANES); l++)
      a[l] = state_i[KECCAK_W*l +: KECCAK_W];

    // theta
    for (int x = 0; x < 5; x++)
      c[x] = a[x] ^ a[x+5] ^ a[x+10] ^ a[x+15] ^ a[x+20];
    for (int x = 0; x < 5; x++) begin
      lane_t cn;
      cn   = c[(x + 1) % 5];
      d[x] = c[(x + 4) % 5] ^ {cn[KECCAK_W-2:0], cn[KECCAK_W-1]};
    end
    for (int l = 0; l < int'(KECCAK_LANES); l++)
      a[l] = a[l] ^ d[l % 5];

    // rho and pi: lane (x,y) rotated, then placed at (y, 2x+3y)
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++) begin
        lane_t v;
        int unsigned r;
        v = a[x + 5*y];
        r = KECCAK_RHO[x + 5*y];
        b[y + 5*((2*x + 3*y) % 5)] = (r == 0) ? v : ((v << r) | (v >> (KECCAK_W - r)));
      end

    // chi
    for (int y = 0; y < 5; y++)
      for (int x = 0; x < 5; x++)
        a[x + 5*y] = b[x + 5*y] ^ (~b[(x+1)%5 + 5*y] & b[(x+2)%5 + 5*y]);

    // iota
    rc = (round_i < 5'(KECCAK_ROUNDS)) ? KECCAK_RC[round_i] : '0;
    a[0] = a[0] ^ rc;

    for (int l = 0; l < int'(KECCAK_LANES); l++)
      state_o[KECCAK_W*l +: KECCAK_W] = a[l];
  end

endmodule
