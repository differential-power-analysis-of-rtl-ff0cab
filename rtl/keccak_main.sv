// keccak_main: a stand-alone hash device on a serial line, built as a
// target for power analysis of MAC-Keccak.
//
// The host sends one 128-byte block (for MAC-Keccak: key || message ||
// padding, all prepared by the host) at 115200 baud, 8N1; the device XORs
// it into an all-zero 1600-bit state, runs the 24 rounds of Keccak-f[1600]
// and answers with the first 32 bytes of the state. After reset it first
// sends one byte 8'h20. trig_bit pulses when hashing starts and stop_bit
// when it ends, for triggering an oscilloscope.
//
// Blocks: res_sync makes the low-active reset NRES, control_stm sequences
// the phases, rs232_stm (with its uart) moves the bytes, converter
// reshapes bytes into lanes and back, and sha3_stm drives the Keccak core.
// A second sha3_stm instance receives the same block and start but its
// outputs are left open; it only raises the power drawn. The dont_touch
// attribute keeps synthesis from removing it.
//
// clk is the 18.432 MHz clock made from the board's 100 MHz oscillator by
// a vendor clock manager outside this RTL. Structure and signal names
// follow the published block diagram.
module keccak_main
  import keccak_pkg::*;
#(
  parameter int unsigned CLK_HZ = 18_432_000,
  parameter int unsigned BAUD   = 115_200
) (
  input  logic clk,       // divided clock, 18.432 MHz
  input  logic res_in,    // high-active asynchronous reset
  input  logic rx,
  output logic tx,
  output logic trig_bit,
  output logic stop_bit
);

  logic nres;
  logic start_recv, start_kec, start_trans, conv_r2k, conv_k2r;
  logic done_recv, done_kec, done_trans;

  rs_in_msg_t   rs_dout;
  rs_out_msg_t  rs_din;
  kec_in_blk_t  sha3_din;
  kec_out_blk_t sha3_dout;

  res_sync u_res_sync (
    .clk    (clk),
    .res_in (res_in),
    .nres   (nres)
  );

  control_stm u_control (
    .clk         (clk),
    .nres        (nres),
    .done_recv   (done_recv),
    .done_kec    (done_kec),
    .done_trans  (done_trans),
    .start_recv  (start_recv),
    .start_kec   (start_kec),
    .start_trans (start_trans),
    .conv_r2k    (conv_r2k),
    .conv_k2r    (conv_k2r)
  );

  rs232_stm #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_rs232 (
    .clk         (clk),
    .nres        (nres),
    .rx          (rx),
    .tx          (tx),
    .start_recv  (start_recv),
    .start_trans (start_trans),
    .done_recv   (done_recv),
    .done_trans  (done_trans),
    .rs_dout     (rs_dout),
    .rs_din      (rs_din)
  );

  converter u_converter (
    .clk       (clk),
    .nres      (nres),
    .conv_r2k  (conv_r2k),
    .conv_k2r  (conv_k2r),
    .rs_dout   (rs_dout),
    .sha3_din  (sha3_din),
    .sha3_dout (sha3_dout),
    .rs_din    (rs_din)
  );

  sha3_stm u_sha3 (
    .clk         (clk),
    .nres        (nres),
    .start_kec   (start_kec),
    .din_array   (sha3_din),
    .dout_array  (sha3_dout),
    .done_kec    (done_kec),
    .trig_bit    (trig_bit),
    .stop_bit    (stop_bit)
  );

  // Dummy instance: same input, outputs unused, present only to draw power.
  (* dont_touch = "true" *)
  sha3_stm u_sha3_dummy (
    .clk         (clk),
    .nres        (nres),
    .start_kec   (start_kec),
    .din_array   (sha3_din),
    .dout_array  (),
    .done_kec    (),
    .trig_bit    (),
    .stop_bit    ()
  );

endmodule
