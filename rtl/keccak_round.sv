// keccak_round: one round of Keccak-f[1600], purely combinational.
//
// The round is the composition iota(chi(pi(rho(theta(state))))). Theta is
// split into the two phases of the datapath: theta1 forms the 320-bit parity
// plane (XOR of the five bits of every column), theta2 XORs every bit with
// the parity of the column to its left and the rotated parity of the column
// to its right. Rho rotates each lane by its fixed offset, pi moves lane
// (x,y) to (y,2x+3y), chi combines each bit with two neighbours of its row
// (a ^ (~b & c)), iota XORs the round constant into lane (0,0).
//
// The parity plane (theta_plane) is the first-round intermediate value whose
// Hamming weight the power model correlates with. The round constant is
// selected by round_idx (0..23). No clock, no state; latency is one cycle
// when the caller registers the result.
module keccak_round
  import keccak_pkg::*;
(
  input  state_t      state_in,
  input  logic [4:0]  round_idx,
  output state_t      state_out
);

  state_t after_theta;
  state_t after_pi;
  plane_t theta_plane;
  plane_t d_col;

  // theta1: parity plane
  always_comb begin
    for (int x = 0; x < 5; x++)
      theta_plane[x] = state_in[0][x] ^ state_in[1][x] ^ state_in[2][x]
                     ^ state_in[3][x] ^ state_in[4][x];
  end

  // theta2: add the two neighbouring column parities
  always_comb begin
    for (int x = 0; x < 5; x++)
      d_col[x] = theta_plane[(x + 4) % 5] ^ rotl(theta_plane[(x + 1) % 5], 6'd1);
    for (int y = 0; y < 5; y++)
      for (int x = 0; x < 5; x++)
        after_theta[y][x] = state_in[y][x] ^ d_col[x];
  end

  // rho and pi
  always_comb begin
    for (int y = 0; y < 5; y++)
      for (int x = 0; x < 5; x++)
        after_pi[(2 * x + 3 * y) % 5][y] = rotl(after_theta[y][x], RHO_OFFSETS[x][y]);
  end

  // chi and iota
  always_comb begin
    for (int y = 0; y < 5; y++)
      for (int x = 0; x < 5; x++)
        state_out[y][x] = after_pi[y][x] ^ (~after_pi[y][(x + 1) % 5] & after_pi[y][(x + 2) % 5]);
    state_out[0][0] = state_out[0][0] ^ ROUND_CONSTANTS[round_idx];
  end

endmodule
