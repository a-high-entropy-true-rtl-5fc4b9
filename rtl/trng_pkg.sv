// trng_pkg: types and constants shared by the TRNG and its Keccak unit.
//
// Holds the control-unit state encoding, the Keccak-f[1600] geometry
// (25 lanes of 64 bits, 24 rounds) and two constant tables that are
// computed at elaboration time rather than typed in:
//   * the 24 iota round constants, produced by the standard Keccak LFSR
//     rc(t) = x^t mod (x^8 + x^6 + x^5 + x^4 + 1), bit 2^j-1 of RC[i]
//     being rc(j + 7*i) for j = 0..6;
//   * the rho rotation offsets, obtained by walking (x,y) <- (y, 2x+3y)
//     from (1,0) and rotating lane t by (t+1)(t+2)/2 mod 64.
// State bit z of lane (x,y) sits at index 64*(x+5*y)+z, the usual
// little-endian mapping of the SHA-3 byte string onto the state.
`timescale 1ns / 100fs
package trng_pkg;

  // Control-unit states (six states of the state diagram).
  typedef enum logic [2:0] {
    ST_IDLE         = 3'd0,
    ST_BIST         = 3'd1,
    ST_WAIT         = 3'd2,
    ST_ES32         = 3'd3,
    ST_WAIT_FOR_ACK = 3'd4,
    ST_DEAD         = 3'd5
  } cu_state_t;

  localparam int unsigned KECCAK_W      = 64;
  localparam int unsigned KECCAK_LANES  = 25;
  localparam int unsigned KECCAK_B      = KECCAK_W * KECCAK_LANES;  // 1600
  localparam int unsigned KECCAK_ROUNDS = 24;

  typedef logic [KECCAK_B-1:0]   keccak_state_t;
  typedef logic [KECCAK_W-1:0]   lane_t;
  typedef lane_t                 rc_table_t [KECCAK_ROUNDS];
  typedef int unsigned           rho_table_t [KECCAK_LANES];

  // One output bit of the round-constant LFSR.
  function automatic logic keccak_rc_bit(input int unsigned t);
    logic [8:0] r;
    r = 9'h001;
    for (int unsigned i = 1; i <= (t % 255); i++) begin
      r = {r[7:0], 1'b0};
      r[0] = r[0] ^ r[8];
      r[4] = r[4] ^ r[8];
      r[5] = r[5] ^ r[8];
      r[6] = r[6] ^ r[8];
      r[8] = 1'b0;
    end
    return r[0];
  endfunction

  function automatic rc_table_t make_rc_table();
    rc_table_t tab;
    lane_t     lane;
    for (int unsigned i = 0; i < KECCAK_ROUNDS; i++) begin
      lane = '0;
      for (int unsigned j = 0; j < 7; j++)
        lane = lane | (lane_t'(keccak_rc_bit(j + 7 * i)) << ((1 << j) - 1));
      tab[i] = lane;
    end
    return tab;
  endfunction

  function automatic rho_table_t make_rho_table();
    rho_table_t tab;
    int unsigned x, y, nx;
    for (int unsigned l = 0; l < KECCAK_LANES; l++) tab[l] = 0;
    x = 1;
    y = 0;
    for (int unsigned t = 0; t < 24; t++) begin
      tab[x + 5 * y] = ((t + 1) * (t + 2) / 2) % KECCAK_W;
      nx = y;
      y  = (2 * x + 3 * y) % 5;
      x  = nx;
    end
    return tab;
  endfunction

  localparam rc_table_t  KECCAK_RC  = make_rc_table();
  localparam rho_table_t KECCAK_RHO = make_rho_table();

endpackage
