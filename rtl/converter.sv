// converter: translates between the serial byte format and the lane format
// of the hash core.
//
// On conv_r2k the 128 received bytes are packed into 16 lanes of 64 bits:
// the byte stream is read in line order (rs_dout[127] first) and every 8
// consecutive bytes form one lane, least significant byte first, which is
// the Keccak byte order. Lane i goes to sha3_din[15-i], because the hash
// block feeds sha3_din[15] first. On conv_k2r the 4 output lanes
// (sha3_dout[3] = lane 0) are split the same way into 32 bytes, rs_din[31]
// being the first to be sent. Both results are registered and hold their
// value until the next conversion; each conversion takes one clock.
//
// That such a conversion stage exists, its two directions and its enable
// states follow the design; the byte and lane order is this design's
// choice, made so that the device computes the standard Keccak-f[1600]
// sponge on the byte string the host sends.
module converter
  import keccak_pkg::*;
(
  input  logic         clk,
  input  logic         nres,
  input  logic         conv_r2k,
  input  logic         conv_k2r,
  input  rs_in_msg_t   rs_dout,
  output kec_in_blk_t  sha3_din,
  input  kec_out_blk_t sha3_dout,
  output rs_out_msg_t  rs_din
);

  always_ff @(posedge clk or negedge nres) begin
    if (!nres) begin
      sha3_din <= '0;
      rs_din   <= '0;
    end else begin
      if (conv_r2k)
        for (int i = 0; i < int'(RATE_LANES); i++)
          for (int j = 0; j < 8; j++)
            sha3_din[RATE_LANES - 1 - i][8 * j +: 8] <= rs_dout[IN_BYTES - 1 - (8 * i + j)];
      if (conv_k2r)
        for (int i = 0; i < int'(OUT_LANES); i++)
          for (int j = 0; j < 8; j++)
            rs_din[OUT_BYTES - 1 - (8 * i + j)] <= sha3_dout[OUT_LANES - 1 - i][8 * j +: 8];
    end
  end

endmodule
