// tb_sha3_stm: runs the hash block as the control machine does (start_kec
// held until done_kec) on random 16-lane blocks and compares dout_array
// with the reference model (din_array[15] is lane 0, dout_array[3] is
// lane 0). Timing checks: trig_bit is a one-cycle pulse in the cycle
// start_kec is first seen; done_kec and stop_bit come 45 cycles later
// (16 load cycles, 24 rounds, announce cycle, 4 output words), which at
// 27 oscilloscope samples per clock puts the stop trigger near sample 1215.
module tb_sha3_stm;
  import keccak_pkg::*;
  import keccak_ref_pkg::*;

  logic clk = 0, nres = 0, start_kec = 0;
  kec_in_blk_t  din_array;
  kec_out_blk_t dout_array;
  logic done_kec, trig_bit, stop_bit;
  int checks = 0, failures = 0, cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  sha3_stm dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] msg [128];
    ref_state_t a;
    int t_trig, t_done, n_trig;
    din_array = '0;
    repeat (3) @(posedge clk);
    nres <= 1'b1;
    repeat (3) @(posedge clk);
    for (int t = 0; t < 6; t++) begin
      for (int k = 0; k < 128; k++) msg[k] = 8'($urandom);
      if (t == 0) begin
        for (int k = 0; k < 128; k++) msg[k] = 8'h00;
        msg[0] = 8'h06; msg[71] = 8'h80;
      end
      for (int i = 0; i < 16; i++)
        for (int j = 0; j < 8; j++) din_array[15 - i][8 * j +: 8] = msg[8 * i + j];
      @(negedge clk);
      start_kec = 1'b1;
      n_trig = 0; t_trig = -1; t_done = -1;
      while (t_done < 0) begin
        #1;
        if (trig_bit) begin n_trig++; t_trig = cycle; end
        if (done_kec) begin
          t_done = cycle;
          check(stop_bit, "stop_bit follows done_kec");
        end
        @(negedge clk);
      end
      start_kec = 1'b0;
      @(negedge clk);
      check(n_trig == 1, $sformatf("trig_bit pulses %0d", n_trig));
      check(t_done - t_trig == 45, $sformatf("done_kec %0d cycles after trig_bit", t_done - t_trig));
      ref_clear(a);
      ref_absorb_bytes(a, msg);
      ref_permute(a);
      for (int i = 0; i < 4; i++)
        check(dout_array[3 - i] == a[i % 5][i / 5], $sformatf("msg %0d lane %0d", t, i));
      if (t == 0) check(dout_array[3] == 64'hc59a3aa2cc739fa6, "SHA3-512('') lane 0");
      repeat (5) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
