// tb_rs232_stm: plays host and controller around the serial block.
// Checks the 8'h20 byte sent after reset; two rounds of: 128 random bytes
// sent on rx, done_recv raised only after the last one, bytes stored with
// the first at rs_dout[127]; then 32 bytes sent on tx, rs_din[31] first,
// with a single done_trans pulse after the last one and none earlier.
module tb_rs232_stm;
  import keccak_pkg::*;
  localparam int BIT = 160;

  logic clk = 0, nres = 0, rx = 1, tx;
  logic start_recv = 0, start_trans = 0, done_recv, done_trans;
  rs_in_msg_t  rs_dout;
  rs_out_msg_t rs_din = '0;
  int checks = 0, failures = 0;
  int n_done_trans = 0;

  always #27 clk = ~clk;
  always @(posedge clk) if (done_trans) n_done_trans++;

  rs232_stm dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
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

  initial begin
    logic [7:0] stream [128];
    logic [7:0] b;
    repeat (4) @(posedge clk);
    nres <= 1;
    recv_tx(b);
    check(b == 8'h20, $sformatf("reset byte %02h", b));
    for (int t = 0; t < 2; t++) begin
      start_recv <= 1;
      for (int k = 0; k < 128; k++) begin
        stream[k] = 8'($urandom);
        check(!done_recv, "done_recv not early");
        send_rx(stream[k]);
      end
      repeat (20) @(posedge clk);
      check(done_recv, "done_recv after 128 bytes");
      start_recv <= 0;
      for (int k = 0; k < 128; k++)
        check(rs_dout[127 - k] == stream[k], $sformatf("stored byte %0d", k));
      for (int k = 0; k < 32; k++) rs_din[k] = 8'($urandom);
      repeat (10) @(posedge clk);
      check(done_recv, "done_recv held until start_trans");
      n_done_trans = 0;
      start_trans <= 1;
      for (int k = 0; k < 32; k++) begin
        recv_tx(b);
        check(b == rs_din[31 - k], $sformatf("sent byte %0d: %02h expected %02h", k, b, rs_din[31 - k]));
        if (k < 31) check(n_done_trans == 0, "done_trans not early");
      end
      repeat (BIT) @(posedge clk);
      check(n_done_trans == 1, $sformatf("done_trans pulses: %0d", n_done_trans));
      start_trans <= 0;
      repeat (50) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
