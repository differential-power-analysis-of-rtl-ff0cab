// tb_keccak_round: checks one combinational round against the reference
// model for random states and every round index, and checks that 24
// chained rounds on the all-zero state give the published first lanes of
// Keccak-f[1600](0): F1258F7940E1DDE7, 84D5CCF933C0478A.
module tb_keccak_round;
  import keccak_pkg::*;
  import keccak_ref_pkg::*;

  state_t     s_in, s_out;
  logic [4:0] ridx;
  int checks = 0, failures = 0;

  keccak_round dut (.state_in(s_in), .round_idx(ridx), .state_out(s_out));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_state_t a;
    // random single rounds
    for (int t = 0; t < 200; t++) begin
      for (int x = 0; x < 5; x++) for (int y = 0; y < 5; y++) begin
        a[x][y] = {$urandom, $urandom};
        s_in[y][x] = a[x][y];
      end
      ridx = 5'(t % 24);
      #1;
      ref_round(a, t % 24);
      for (int x = 0; x < 5; x++) for (int y = 0; y < 5; y++)
        check(s_out[y][x] == a[x][y], $sformatf("round %0d lane (%0d,%0d)", t % 24, x, y));
    end
    // full permutation of the zero state through the DUT
    s_in = '0;
    for (int ir = 0; ir < 24; ir++) begin
      ridx = 5'(ir);
      #1;
      s_in = s_out;
    end
    check(s_in[0][0] == 64'hF1258F7940E1DDE7, "Keccak-f(0) lane 0");
    check(s_in[0][1] == 64'h84D5CCF933C0478A, "Keccak-f(0) lane 1");
    // and the reference model agrees
    ref_clear(a);
    ref_permute(a);
    check(a[0][0] == 64'hF1258F7940E1DDE7, "reference Keccak-f(0) lane 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
