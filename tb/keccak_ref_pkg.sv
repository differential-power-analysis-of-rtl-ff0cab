// keccak_ref_pkg: reference model of Keccak-f[1600] for the testbenches.
//
// Written independently of the RTL: it works on an unpacked 5x5 array of
// lanes indexed [x][y], uses the published tables of rotation offsets and
// round constants literally (the RTL derives them from their recurrences),
// and applies the steps in the order of the Keccak reference pseudo-code.
// Also provides helpers to move between byte strings and lanes.
package keccak_ref_pkg;

  typedef logic [63:0] ref_lane_t;
  typedef ref_lane_t ref_state_t [5][5];   // [x][y]

  localparam ref_lane_t RC [24] = '{
    64'h0000000000000001, 64'h0000000000008082, 64'h800000000000808A,
    64'h8000000080008000, 64'h000000000000808B, 64'h0000000080000001,
    64'h8000000080008081, 64'h8000000000008009, 64'h000000000000008A,
    64'h0000000000000088, 64'h0000000080008009, 64'h000000008000000A,
    64'h000000008000808B, 64'h800000000000008B, 64'h8000000000008089,
    64'h8000000000008003, 64'h8000000000008002, 64'h8000000000000080,
    64'h000000000000800A, 64'h800000008000000A, 64'h8000000080008081,
    64'h8000000000008080, 64'h0000000080000001, 64'h8000000080008008
  };

  // r[x][y]
  localparam int ROT [5][5] = '{
    '{ 0, 36,  3, 41, 18},
    '{ 1, 44, 10, 45,  2},
    '{62,  6, 43, 15, 61},
    '{28, 55, 25, 21, 56},
    '{27, 20, 39,  8, 14}
  };

  function automatic ref_lane_t rol(ref_lane_t v, int n);
    ref_lane_t r;
    for (int z = 0; z < 64; z++) r[(z + n) % 64] = v[z];
    return r;
  endfunction

  function automatic void ref_round(ref ref_state_t a, input int ir);
    ref_lane_t c [5];
    ref_lane_t d [5];
    ref_state_t b;
    for (int x = 0; x < 5; x++) c[x] = a[x][0] ^ a[x][1] ^ a[x][2] ^ a[x][3] ^ a[x][4];
    for (int x = 0; x < 5; x++) d[x] = c[(x + 4) % 5] ^ rol(c[(x + 1) % 5], 1);
    for (int x = 0; x < 5; x++) for (int y = 0; y < 5; y++) a[x][y] ^= d[x];
    for (int x = 0; x < 5; x++) for (int y = 0; y < 5; y++)
      b[y][(2 * x + 3 * y) % 5] = rol(a[x][y], ROT[x][y]);
    for (int x = 0; x < 5; x++) for (int y = 0; y < 5; y++)
      a[x][y] = b[x][y] ^ ((~b[(x + 1) % 5][y]) & b[(x + 2) % 5][y]);
    a[0][0] ^= RC[ir];
  endfunction

  function automatic void ref_permute(ref ref_state_t a);
    for (int ir = 0; ir < 24; ir++) ref_round(a, ir);
  endfunction

  function automatic void ref_clear(ref ref_state_t a);
    for (int x = 0; x < 5; x++) for (int y = 0; y < 5; y++) a[x][y] = '0;
  endfunction

  // Lane i of the sponge is a[i%5][i/5]; byte k of the message is byte k%8
  // (little-endian) of lane k/8.
  function automatic void ref_absorb_bytes(ref ref_state_t a, input logic [7:0] msg [128]);
    for (int k = 0; k < 128; k++)
      a[(k / 8) % 5][(k / 8) / 5][8 * (k % 8) +: 8] ^= msg[k];
  endfunction

  function automatic logic [7:0] ref_out_byte(ref ref_state_t a, input int k);
    return a[(k / 8) % 5][(k / 8) / 5][8 * (k % 8) +: 8];
  endfunction

  // Hamming weight of the first key byte's parity column slice, x=0, z=0..7
  // (the first-round power model quantity).
  function automatic int ref_hw_theta_plane_byte0(ref ref_state_t a);
    int hw = 0;
    for (int z = 0; z < 8; z++)
      if (a[0][0][z] ^ a[0][1][z] ^ a[0][2][z] ^ a[0][3][z] ^ a[0][4][z]) hw++;
    return hw;
  endfunction

endpackage
