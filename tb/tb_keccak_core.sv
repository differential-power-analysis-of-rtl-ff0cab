// tb_keccak_core: drives the Keccak core the way the hash state machine
// does (start, 16 words, last_block, wait for ready_n, collect 4 words).
// Checks: the published SHA3-512 digest of the empty string (its padded
// block fits in one 1024-bit block, so the first 32 bytes of that digest
// are the first 4 lanes of the permuted state); random single blocks and
// two-block messages against the reference model; and the timing of one
// block: 16 load cycles, buffer_full for exactly one cycle, first round in
// the 17th cycle after start, ready_n low 24 cycles later.
module tb_keccak_core;
  import keccak_pkg::*;
  import keccak_ref_pkg::*;

  logic  clk = 0, rst_n = 0, start = 0, din_val = 0, last_block = 0;
  lane_t din = '0, dout;
  logic  buffer_full, ready_n, dout_valid_n;
  int checks = 0, failures = 0;
  int cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  keccak_core dut (.*);

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

  // Load one 16-word block; lane i of the block is msg bytes 8i..8i+7.
  task automatic load_block(input logic [7:0] msg [128]);
    for (int i = 0; i < 16; i++) begin
      din_val <= 1'b1;
      for (int j = 0; j < 8; j++) din[8 * j +: 8] <= msg[8 * i + j];
      @(posedge clk);
    end
    din_val <= 1'b0;
    din     <= '0;
  endtask

  // Hash 'nblk' blocks; returns the 4 output lanes and cycle counts.
  task automatic run_hash(input logic [7:0] blocks [2][128], input int nblk,
                          output lane_t res [4], output int full_cycles,
                          output int ready_at);
    int t0, n;
    full_cycles = 0;
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    t0 = cycle;
    for (int b = 0; b < nblk; b++) begin
      load_block(blocks[b]);
      #1;
      while (buffer_full) begin
        full_cycles++;
        @(posedge clk);
        #1;
      end
      if (b == nblk - 1) begin
        last_block <= 1'b1;
        @(posedge clk);
        last_block <= 1'b0;
      end else begin
        // wait until the permutation is over before the next block
        repeat (24) @(posedge clk);
      end
    end
    #1;
    while (ready_n) begin
      @(posedge clk);
      #1;
    end
    ready_at = cycle - t0;
    n = 0;
    while (n < 4) begin
      @(posedge clk);
      #1;
      if (!dout_valid_n) begin
        res[n] = dout;
        n++;
      end
    end
  endtask

  initial begin
    logic [7:0] blocks [2][128];
    lane_t res [4];
    ref_state_t a;
    int fc, ra;

    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);

    // SHA3-512("") padded block: 0x06 ... 0x80 at byte 71
    for (int k = 0; k < 128; k++) blocks[0][k] = 8'h00;
    blocks[0][0]  = 8'h06;
    blocks[0][71] = 8'h80;
    run_hash(blocks, 1, res, fc, ra);
    check(res[0] == 64'hc59a3aa2cc739fa6, "SHA3-512('') lane 0");
    check(res[1] == 64'h6e755a18dc67b5c8, "SHA3-512('') lane 1");
    check(res[2] == 64'h5958e24f1682c997, "SHA3-512('') lane 2");
    check(res[3] == 64'ha6805c47c1dcd1e0, "SHA3-512('') lane 3");
    check(fc == 1, $sformatf("buffer_full lasted %0d cycles", fc));
    // start at cycle 0, words in 1..16, round 1 in 17, round 24 in 40,
    // ready_n observed low in cycle 41
    check(ra == 41, $sformatf("ready_n fell %0d cycles after start", ra));

    // random single blocks
    for (int t = 0; t < 8; t++) begin
      for (int k = 0; k < 128; k++) blocks[0][k] = 8'($urandom);
      run_hash(blocks, 1, res, fc, ra);
      ref_clear(a);
      ref_absorb_bytes(a, blocks[0]);
      ref_permute(a);
      for (int i = 0; i < 4; i++)
        check(res[i] == a[i % 5][i / 5], $sformatf("random block %0d lane %0d", t, i));
    end

    // two-block messages
    for (int t = 0; t < 3; t++) begin
      for (int b = 0; b < 2; b++) for (int k = 0; k < 128; k++) blocks[b][k] = 8'($urandom);
      run_hash(blocks, 2, res, fc, ra);
      ref_clear(a);
      ref_absorb_bytes(a, blocks[0]);
      ref_permute(a);
      ref_absorb_bytes(a, blocks[1]);
      ref_permute(a);
      for (int i = 0; i < 4; i++)
        check(res[i] == a[i % 5][i / 5], $sformatf("two-block %0d lane %0d", t, i));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
