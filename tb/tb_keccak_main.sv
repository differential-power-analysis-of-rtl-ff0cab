// tb_keccak_main: end-to-end test of the hash device at its default
// parameters (18.432 MHz clock, 115200 baud). Plays the host: after reset
// it expects the 8'h20 byte, then sends 128-byte blocks and reads back 32
// bytes, comparing them with the reference model. Blocks are MAC-Keccak
// inputs: the 40-byte key A0..AF 20..2F C0..C7, an 80-byte random message
// and Keccak padding (01, zeros, final byte OR 80); the first block is the
// SHA3-512 padding of the empty string, whose digest is published. A reset
// in the middle of a transfer checks that the device restarts cleanly; the
// last message is then hashed NREP times in a row, as a capture run does
// to average traces.
// Counted mechanisms: reset byte, reception, both conversions, hashing by
// both the main and the dummy core, trigger pulses 45 cycles apart,
// transmission, reset during operation. Each must happen at least once.
module tb_keccak_main;
  import keccak_ref_pkg::*;
  localparam int BIT = 160;
  localparam int NMSG = 4;
  localparam int NREP = 3;

  logic clk = 0, res_in = 1, rx = 1, tx, trig_bit, stop_bit;
  int checks = 0, failures = 0, cycle = 0;
  int n_reset_byte = 0, n_recv = 0, n_r2k = 0, n_k2r = 0, n_trig = 0, n_stop = 0;
  int n_dummy = 0, n_trans = 0, n_midreset = 0;
  int t_trig = 0;

  always #27 clk = ~clk;

  keccak_main dut (.*);

  always @(posedge clk) begin
    cycle++;
    if (dut.u_control.conv_r2k) n_r2k++;
    if (dut.u_control.conv_k2r) n_k2r++;
    if (dut.done_recv && dut.u_control.start_recv) n_recv++;
    if (dut.done_trans) n_trans++;
    if (dut.u_sha3_dummy.done_kec) n_dummy++;
    if (trig_bit) begin
      n_trig++;
      t_trig = cycle;
    end
    if (stop_bit) begin
      n_stop++;
      checks++;
      if (cycle - t_trig != 45) begin
        failures++;
        $display("FAIL: stop_bit %0d cycles after trig_bit", cycle - t_trig);
      end
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (5000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send_rx(input logic [7:0] b);
    logic [9:0] fr;
    fr = {1'b1, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      rx <= fr[i];
      repeat (BIT) @(posedge clk);
    end
  endtask

  task automatic recv_tx(output logic [7:0] b);
    @(negedge tx);
    repeat (BIT / 2) @(posedge clk);
    for (int i = 0; i < 8; i++) begin
      repeat (BIT) @(posedge clk);
      b[i] = tx;
    end
    repeat (BIT) @(posedge clk);
    check(tx == 1, "stop bit");
  endtask

  task automatic do_reset();
    logic [7:0] b;
    res_in <= 1;
    repeat (5) @(posedge clk);
    res_in <= 0;
    recv_tx(b);
    check(b == 8'h20, $sformatf("reset byte %02h", b));
    if (b == 8'h20) n_reset_byte++;
  endtask

  task automatic mac_block(output logic [7:0] blk [128]);
    logic [7:0] key [40];
    for (int i = 0; i < 16; i++) key[i]      = 8'hA0 + 8'(i);
    for (int i = 0; i < 16; i++) key[16 + i] = 8'h20 + 8'(i);
    for (int i = 0; i < 8; i++)  key[32 + i] = 8'hC0 + 8'(i);
    for (int k = 0; k < 40; k++) blk[k] = key[k];
    for (int k = 40; k < 120; k++) blk[k] = 8'($urandom);
    blk[120] = 8'h01;
    for (int k = 121; k < 128; k++) blk[k] = 8'h00;
    blk[127] |= 8'h80;
  endtask

  task automatic hash_one(input logic [7:0] blk [128], input bit known_empty);
    ref_state_t a;
    logic [7:0] got [32];
    // the answer may start before the last stop bit has ended, so listen
    // while sending
    fork
      for (int k = 0; k < 128; k++) send_rx(blk[k]);
      for (int k = 0; k < 32; k++) recv_tx(got[k]);
    join
    ref_clear(a);
    ref_absorb_bytes(a, blk);
    $display("block HW(theta plane, x=0, z=0..7) = %0d", ref_hw_theta_plane_byte0(a));
    ref_permute(a);
    for (int k = 0; k < 32; k++)
      check(got[k] == ref_out_byte(a, k), $sformatf("digest byte %0d: %02h expected %02h", k, got[k], ref_out_byte(a, k)));
    if (known_empty) check(ref_out_byte(a, 0) == 8'ha6 && ref_out_byte(a, 31) == 8'ha6,
                           "reference agrees with SHA3-512('')");
  endtask

  initial begin
    logic [7:0] blk [128];
    repeat (4) @(posedge clk);
    do_reset();
    for (int k = 0; k < 128; k++) blk[k] = 8'h00;
    blk[0] = 8'h06; blk[71] = 8'h80;
    hash_one(blk, 1);
    for (int m = 0; m < NMSG - 1; m++) begin
      mac_block(blk);
      hash_one(blk, 0);
    end
    // reset in the middle of a reception
    mac_block(blk);
    for (int k = 0; k < 50; k++) send_rx(blk[k]);
    n_midreset++;
    do_reset();
    // the same message hashed repeatedly, as for trace averaging
    mac_block(blk);
    for (int r = 0; r < NREP; r++) hash_one(blk, 0);
    repeat (2 * BIT) @(posedge clk);

    check(n_reset_byte == 2, "reset byte after both resets");
    check(n_recv >= 1, "reception happened");
    check(n_r2k == NMSG + NREP, $sformatf("conv_r2k count %0d", n_r2k));
    check(n_k2r == NMSG + NREP, $sformatf("conv_k2r count %0d", n_k2r));
    check(n_trig == NMSG + NREP && n_stop == NMSG + NREP, $sformatf("trig %0d stop %0d", n_trig, n_stop));
    check(n_dummy == NMSG + NREP, $sformatf("dummy instance hashed %0d times", n_dummy));
    check(n_trans == NMSG + NREP, $sformatf("transmissions %0d", n_trans));
    check(n_midreset == 1, "reset during operation");
    $display("mechanisms: reset_byte=%0d recv=%0d r2k=%0d hash=%0d dummy=%0d k2r=%0d trans=%0d midreset=%0d",
             n_reset_byte, n_recv, n_r2k, n_trig, n_dummy, n_k2r, n_trans, n_midreset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
