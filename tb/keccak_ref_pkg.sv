// keccak_ref_pkg: a plain reference model of Keccak-f[1600] for the
// testbenches. It is written independently of the RTL: the state is a
// 5x5 array of lanes, and the round constants and rotation offsets are the
// published values of the Keccak specification, typed in as tables.
`timescale 1ns / 100fs
package keccak_ref_pkg;

  typedef logic [63:0]   lane64_t;
  typedef logic [1599:0] st1600_t;

  localparam lane64_t REF_RC [24] = '{
    64'h0000000000000001, 64'h0000000000008082, 64'h800000000000808A,
    64'h8000000080008000, 64'h000000000000808B, 64'h0000000080000001,
    64'h8000000080008081, 64'h8000000000008009, 64'h000000000000008A,
    64'h0000000000000088, 64'h0000000080008009, 64'h000000008000000A,
    64'h000000008000808B, 64'h800000000000008B, 64'h8000000000008089,
    64'h8000000000008003, 64'h8000000000008002, 64'h8000000000000080,
    64'h000000000000800A, 64'h800000008000000A, 64'h8000000080008081,
    64'h8000000000008080, 64'h0000000080000001, 64'h8000000080008008
  };

  // REF_ROT[x][y]
  localparam int REF_ROT [5][5] = '{
    '{ 0, 36,  3, 41, 18},
    '{ 1, 44, 10, 45,  2},
    '{62,  6, 43, 15, 61},
    '{28, 55, 25, 21, 56},
    '{27, 20, 39,  8, 14}
  };

  function automatic lane64_t rotl(input lane64_t v, input int n);
    if (n == 0) return v;
    return (v << n) | (v >> (64 - n));
  endfunction

  function automatic st1600_t ref_round(input st1600_t s, input int rnd);
    lane64_t A [5][5];
    lane64_t B [5][5];
    lane64_t C [5];
    lane64_t D [5];
    st1600_t o;
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++)
        A[x][y] = s[64*(x+5*y) +: 64];
    for (int x = 0; x < 5; x++)
      C[x] = A[x][0] ^ A[x][1] ^ A[x][2] ^ A[x][3] ^ A[x][4];
    for (int x = 0; x < 5; x++)
      D[x] = C[(x+4)%5] ^ rotl(C[(x+1)%5], 1);
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++)
        A[x][y] ^= D[x];
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++)
        B[y][(2*x+3*y)%5] = rotl(A[x][y], REF_ROT[x][y]);
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++)
        A[x][y] = B[x][y] ^ (~B[(x+1)%5][y] & B[(x+2)%5][y]);
    A[0][0] ^= REF_RC[rnd];
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++)
        o[64*(x+5*y) +: 64] = A[x][y];
    return o;
  endfunction

  function automatic st1600_t ref_keccak_f(input st1600_t s);
    st1600_t t = s;
    for (int r = 0; r < 24; r++) t = ref_round(t, r);
    return t;
  endfunction

  function automatic st1600_t rand_state();
    st1600_t s;
    for (int i = 0; i < 50; i++) s[32*i +: 32] = $urandom;
    return s;
  endfunction

endpackage
