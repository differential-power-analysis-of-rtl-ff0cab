// tb_uart: serial frames into rx at the nominal bit time and at +-2%,
// checking data_out/data_out_stb and the ack handshake; bytes through the
// transmitter, decoded from tx in the middle of each bit, checking framing
// and that data_in_ack comes once the whole 10-bit frame (10 x 160 clocks
// at 18.432 MHz, 115200 baud, 16x oversampling) has been sent.
module tb_uart;
  localparam int BIT = 160;   // 18_432_000 / 115_200

  logic clk = 0, rst_n = 0, rx = 1, tx;
  logic [7:0] data_in = '0, data_out;
  logic data_in_stb = 0, data_in_ack, data_out_stb, data_out_ack = 0;
  int checks = 0, failures = 0;

  always #27 clk = ~clk;
  uart dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send_rx(input logic [7:0] b, input int bit_cyc);
    logic [9:0] fr;
    fr = {1'b1, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      rx <= fr[i];
      repeat (bit_cyc) @(posedge clk);
    end
  endtask

  initial begin
    logic [7:0] b, got;
    int n, t_acc, t_ack;
    repeat (4) @(posedge clk);
    rst_n <= 1;
    repeat (4) @(posedge clk);
    // receiver
    for (int t = 0; t < 12; t++) begin
      b = 8'($urandom);
      send_rx(b, (t % 3 == 0) ? BIT : (t % 3 == 1) ? BIT * 98 / 100 : BIT * 102 / 100);
      n = 0;
      while (!data_out_stb && n < 200) begin @(posedge clk); n++; end
      check(data_out_stb, "data_out_stb raised");
      check(data_out == b, $sformatf("rx byte %02h got %02h", b, data_out));
      repeat (3) @(posedge clk);
      check(data_out_stb, "strobe held until ack");
      data_out_ack <= 1; @(posedge clk); data_out_ack <= 0; @(posedge clk);
      #1 check(!data_out_stb, "strobe cleared by ack");
    end
    // transmitter
    for (int t = 0; t < 8; t++) begin
      b = 8'($urandom);
      data_in <= b; data_in_stb <= 1;
      t_acc = 0;
      @(negedge tx);
      repeat (BIT / 2) @(posedge clk);
      check(tx == 0, "start bit");
      for (int i = 0; i < 8; i++) begin
        repeat (BIT) @(posedge clk);
        got[i] = tx;
      end
      repeat (BIT) @(posedge clk);
      check(tx == 1, "stop bit");
      check(got == b, $sformatf("tx byte %02h got %02h", b, got));
      // ack comes at the end of the stop bit: about half a bit from here
      t_ack = 0;
      while (!data_in_ack && t_ack < 400) begin @(posedge clk); t_ack++; end
      check(data_in_ack, "data_in_ack pulsed");
      check(t_ack >= BIT / 2 - 4 && t_ack <= BIT / 2 + 4, $sformatf("ack %0d cycles after mid stop bit", t_ack));
      data_in_stb <= 0;
      @(posedge clk);
      #1 check(tx == 1 && !data_in_ack, "idle after frame");
      repeat (20) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
