// tb_converter: random bytes through both directions of the converter.
// Expected values are built from the byte streams: stream byte k is
// rs_dout[127-k]; lane i (fed as sha3_din[15-i]) holds stream bytes
// 8i..8i+7, least significant byte first. The output side is the inverse
// on 4 lanes and 32 bytes. Also checks that each side only changes when
// its enable is high.
module tb_converter;
  import keccak_pkg::*;

  logic clk = 0, nres = 0, conv_r2k = 0, conv_k2r = 0;
  rs_in_msg_t   rs_dout;
  kec_in_blk_t  sha3_din;
  kec_out_blk_t sha3_dout;
  rs_out_msg_t  rs_din;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  converter dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] stream [128];
    logic [7:0] ostream [32];
    kec_in_blk_t  held_din;
    rs_out_msg_t  held_rs;
    repeat (2) @(negedge clk);
    nres = 1;
    for (int t = 0; t < 20; t++) begin
      for (int k = 0; k < 128; k++) begin
        stream[k] = 8'($urandom);
        rs_dout[127 - k] = stream[k];
      end
      for (int i = 0; i < 4; i++) sha3_dout[i] = {$urandom, $urandom};
      conv_r2k = 1;
      @(negedge clk);
      conv_r2k = 0;
      for (int i = 0; i < 16; i++)
        check(sha3_din[15 - i] == {stream[8*i+7], stream[8*i+6], stream[8*i+5], stream[8*i+4],
                                   stream[8*i+3], stream[8*i+2], stream[8*i+1], stream[8*i]},
              $sformatf("r2k lane %0d", i));
      held_rs = rs_din;
      conv_k2r = 1;
      @(negedge clk);
      conv_k2r = 0;
      for (int k = 0; k < 32; k++) ostream[k] = rs_din[31 - k];
      for (int i = 0; i < 4; i++)
        check(sha3_dout[3 - i] == {ostream[8*i+7], ostream[8*i+6], ostream[8*i+5], ostream[8*i+4],
                                   ostream[8*i+3], ostream[8*i+2], ostream[8*i+1], ostream[8*i]},
              $sformatf("k2r lane %0d", i));
      // hold without enables
      held_din = sha3_din;
      held_rs  = rs_din;
      rs_dout  = ~rs_dout;
      sha3_dout = ~sha3_dout;
      @(negedge clk);
      check(sha3_din == held_din && rs_din == held_rs, "outputs hold without enable");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
