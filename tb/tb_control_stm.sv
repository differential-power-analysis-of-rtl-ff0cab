// tb_control_stm: walks the control machine around its ring several times
// with done signals arriving after random delays, and checks after every
// clock that exactly the expected output is high: start_recv until
// done_recv, one cycle of conv_r2k, start_kec until done_kec, one cycle of
// conv_k2r, start_trans until done_trans, one cycle of init with all low.
module tb_control_stm;
  logic clk = 0, nres = 0, done_recv = 0, done_kec = 0, done_trans = 0;
  logic start_recv, start_kec, start_trans, conv_r2k, conv_k2r;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  control_stm dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic expect_out(input logic [4:0] e, input string what);
    check({start_recv, conv_r2k, start_kec, conv_k2r, start_trans} == e, what);
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int d;
    #1;
    expect_out(5'b00000, "init in reset");
    @(negedge clk);
    nres = 1;
    @(negedge clk);
    for (int t = 0; t < 10; t++) begin
      d = $urandom_range(0, 6);
      repeat (d) begin expect_out(5'b10000, "rs_receive waits"); @(negedge clk); end
      expect_out(5'b10000, "rs_receive");
      done_recv = 1; @(negedge clk); done_recv = 0;
      expect_out(5'b01000, "conv_r2k"); @(negedge clk);
      d = $urandom_range(0, 6);
      repeat (d) begin expect_out(5'b00100, "dokeccak waits"); @(negedge clk); end
      done_kec = 1; @(negedge clk); done_kec = 0;
      expect_out(5'b00010, "conv_k2r"); @(negedge clk);
      d = $urandom_range(0, 6);
      repeat (d) begin expect_out(5'b00001, "rs_transceive waits"); @(negedge clk); end
      done_trans = 1; @(negedge clk); done_trans = 0;
      expect_out(5'b00000, "init"); @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
