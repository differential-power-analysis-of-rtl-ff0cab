// keccak_pkg: types and constants shared by the Keccak-f[1600] datapath.
//
// The 1600-bit state is held as a packed array of 25 lanes of 64 bits,
// indexed state[y][x], so that lane x+5*y occupies bits 64*(x+5*y) +: 64 of
// the flat vector. This is the usual Keccak lane order: the first byte that
// enters the sponge is the low byte of lane (0,0).
//
// The rho rotation offsets and the 24 iota round constants are computed by
// constant functions from their defining recurrences in the Keccak
// specification (offset (t+1)(t+2)/2 along the (x,y) -> (y,2x+3y) walk, and
// the degree-8 LFSR x^8+x^6+x^5+x^4+1 for the constants), rather than typed
// in as tables.
package keccak_pkg;

  localparam int unsigned LANE_W    = 64;   // w: lane width (z range 0..63)
  localparam int unsigned NUM_ROUNDS = 24;  // rounds per Keccak-f[1600]
  localparam int unsigned RATE_BITS  = 1024; // r
  localparam int unsigned RATE_LANES = RATE_BITS / LANE_W; // 16 input words
  localparam int unsigned OUT_LANES  = 4;    // 256-bit output, 4 words

  typedef logic [LANE_W-1:0] lane_t;
  typedef lane_t [4:0][4:0] state_t;   // [y][x]
  typedef lane_t [4:0]      plane_t;   // [x], e.g. the theta parity plane

  // Serial message format: 128 input bytes and 32 output bytes. Index 127
  // (input) and 31 (output) is the byte that travels first on the line.
  localparam int unsigned IN_BYTES  = RATE_BITS / 8;
  localparam int unsigned OUT_BYTES = OUT_LANES * LANE_W / 8;
  typedef logic [7:0] byte_t;
  typedef byte_t [IN_BYTES-1:0]  rs_in_msg_t;
  typedef byte_t [OUT_BYTES-1:0] rs_out_msg_t;
  typedef lane_t [RATE_LANES-1:0] kec_in_blk_t;
  typedef lane_t [OUT_LANES-1:0]  kec_out_blk_t;

  typedef lane_t [NUM_ROUNDS-1:0] rc_table_t;
  typedef logic [4:0][4:0][5:0] rho_table_t;   // [x][y] rotation amount

  // Rotate a lane left by n (toward higher z).
  function automatic lane_t rotl(lane_t v, logic [5:0] n);
    if (n == 6'd0) return v;
    return (v << n) | (v >> (7'd64 - {1'b0, n}));
  endfunction

  // rc(t) from the LFSR defined in the Keccak reference.
  function automatic logic lfsr_bit(int unsigned t);
    logic [7:0] r;
    r = 8'h01;
    for (int unsigned i = 0; i < (t % 255); i++) begin
      // shift left, feed back x^8 into taps 0,4,5,6
      if (r[7]) r = {r[6:0], 1'b0} ^ 8'h71;
      else      r = {r[6:0], 1'b0};
    end
    return r[0];
  endfunction

  function automatic rc_table_t gen_round_constants();
    rc_table_t tbl;
    for (int unsigned ir = 0; ir < NUM_ROUNDS; ir++) begin
      tbl[ir] = '0;
      for (int unsigned j = 0; j < 7; j++)
        tbl[ir][(1 << j) - 1] = lfsr_bit(j + 7 * ir);
    end
    return tbl;
  endfunction

  function automatic rho_table_t gen_rho_offsets();
    rho_table_t tbl;
    int unsigned x, y, nx;
    tbl = '0;
    x = 1; y = 0;
    for (int unsigned t = 0; t < 24; t++) begin
      tbl[x][y] = 6'(((t + 1) * (t + 2) / 2) % LANE_W);
      nx = y;
      y  = (2 * x + 3 * y) % 5;
      x  = nx;
    end
    return tbl;
  endfunction

  localparam rc_table_t  ROUND_CONSTANTS = gen_round_constants();
  localparam rho_table_t RHO_OFFSETS     = gen_rho_offsets();

endpackage
