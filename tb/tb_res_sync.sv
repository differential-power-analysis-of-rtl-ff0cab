// tb_res_sync: nres must fall as soon as res_in rises (no clock needed) and
// rise only at the second rising clock edge after res_in falls.
module tb_res_sync;
  logic clk = 0, res_in = 1, nres;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  res_sync dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 5; t++) begin
      @(negedge clk); #2;
      res_in = 1; #1;
      check(!nres, "asserted asynchronously");
      repeat (3) @(posedge clk);
      #1 check(!nres, "held while res_in high");
      @(negedge clk);
      res_in = 0;
      @(posedge clk); #1 check(!nres, "still low after first edge");
      @(posedge clk); #1 check(nres, "released at second edge");
      repeat ($urandom_range(1, 4)) @(posedge clk);
      #1 check(nres, "stays released");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
