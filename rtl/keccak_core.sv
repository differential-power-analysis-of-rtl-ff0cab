// keccak_core: iterative Keccak-f[1600] sponge core, one round per clock.
//
// The core owns a 16 x 64-bit input buffer (one 1024-bit rate block), the
// 1600-bit state register and a round counter. Words are written into the
// buffer one per cycle with din_val, lane 0 first. When the 16th word is in,
// buffer_full rises; in the next cycle the block is XORed into the rate part
// of the state and the first round is computed on the result in the same
// cycle (the "round 1" multiplexer of the datapath), which frees the buffer
// again (buffer_full falls). The remaining 23 rounds follow on consecutive
// clocks. If last_block has been seen since start, the core then squeezes:
// ready_n falls and stays low, and one cycle later the first OUT_LANES lanes
// of the state are presented on dout, lane 0 first, one per cycle, each
// marked by dout_valid_n low. Without last_block it waits for the next block.
//
// start (one cycle) clears the state, the buffer and the last_block flag
// for a new hash. rst_n is a synchronous low-active reset, so it may be
// driven by a controlling state machine.
//
// Ports follow the signal names of the controlling state machine; ready_n
// and dout_valid_n are low-active because that machine waits for them to
// be '0'. The internal organisation (buffer, XOR-and-first-round in one
// cycle, one round per cycle) is this design's own reading of the
// unprotected high-speed reference core. Timing: 16 cycles to load, 24
// cycles of rounds, one announce cycle, then OUT_LANES output cycles.
module keccak_core
  import keccak_pkg::*;
#(
  parameter int unsigned OUT_WORDS = OUT_LANES
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  lane_t  din,
  input  logic   din_val,
  output logic   buffer_full,
  input  logic   last_block,
  output logic   ready_n,
  output lane_t  dout,
  output logic   dout_valid_n
);

  typedef enum logic [2:0] {
    P_WAIT,      // waiting for a full buffer
    P_RUN,       // rounds 2..24
    P_ANNOUNCE,  // permutation of the last block done, ready_n low
    P_SQUEEZE,   // output words
    P_DONE       // result delivered, waiting for start
  } phase_t;

  phase_t        phase;
  state_t        state;
  lane_t [RATE_LANES-1:0] buffer;
  logic  [4:0]   word_cnt;     // 0..16 words in buffer
  logic  [4:0]   round_cnt;    // index of the round computed this cycle
  logic  [2:0]   out_idx;
  logic          last_seen;

  state_t        round_in;
  state_t        round_out;
  logic  [4:0]   round_idx;
  logic          absorb;

  assign buffer_full = (word_cnt == 5'(RATE_LANES));
  assign absorb      = (phase == P_WAIT) && buffer_full;

  // Round-1 multiplexer: state XOR block when a block is absorbed.
  always_comb begin
    round_in  = state;
    round_idx = round_cnt;
    if (absorb) begin
      for (int i = 0; i < int'(RATE_LANES); i++)
        round_in[i / 5][i % 5] = state[i / 5][i % 5] ^ buffer[i];
      round_idx = 5'd0;
    end
  end

  keccak_round u_round (
    .state_in    (round_in),
    .round_idx   (round_idx),
    .state_out   (round_out)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase     <= P_WAIT;
      state     <= '0;
      buffer    <= '0;
      word_cnt  <= '0;
      round_cnt <= '0;
      out_idx   <= '0;
      last_seen <= 1'b0;
    end else if (start) begin
      phase     <= P_WAIT;
      state     <= '0;
      word_cnt  <= '0;
      round_cnt <= '0;
      out_idx   <= '0;
      last_seen <= 1'b0;
    end else begin
      if (last_block) last_seen <= 1'b1;

      if (absorb) begin
        word_cnt <= '0;
      end else if (din_val && !buffer_full) begin
        buffer[word_cnt[3:0]] <= din;
        word_cnt <= word_cnt + 5'd1;
      end

      unique case (phase)
        P_WAIT: if (absorb) begin
          state     <= round_out;
          round_cnt <= 5'd1;
          phase     <= P_RUN;
        end
        P_RUN: begin
          state     <= round_out;
          round_cnt <= round_cnt + 5'd1;
          if (round_cnt == 5'(NUM_ROUNDS - 1)) begin
            round_cnt <= '0;
            phase     <= (last_seen || last_block) ? P_ANNOUNCE : P_WAIT;
          end
        end
        P_ANNOUNCE: begin
          out_idx <= '0;
          phase   <= P_SQUEEZE;
        end
        P_SQUEEZE: begin
          out_idx <= out_idx + 3'd1;
          if (out_idx == 3'(OUT_WORDS - 1)) phase <= P_DONE;
        end
        P_DONE: ;
        default: phase <= P_WAIT;
      endcase
    end
  end

  // A word offered while the buffer is full would be lost.
  a_no_write_when_full: assert property (@(posedge clk) disable iff (!rst_n)
    din_val |-> !buffer_full);

  assign ready_n      = !(phase inside {P_ANNOUNCE, P_SQUEEZE, P_DONE});
  assign dout_valid_n = (phase != P_SQUEEZE);
  assign dout         = (phase == P_SQUEEZE) ? state[out_idx / 5][out_idx % 5] : '0;

endmodule
