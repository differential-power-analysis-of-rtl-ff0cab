// sha3_stm: hash computation block. Feeds one 1024-bit block to the Keccak
// core and collects the 256-bit result.
//
// On start_kec the machine pulses the core's start, raises trig_bit for one
// cycle (the oscilloscope trigger) and presets the index counters. It then
// writes the 16 input lanes din_array[15] down to din_array[0], one per
// cycle, into the core buffer (din_array[15] is lane 0 of the state). After
// the buffer is taken by the core it flags last_block, since every message
// here is a single rate block, and waits for the core's ready_n. The four
// output lanes are stored as they arrive into dout_array[3] down to
// dout_array[0] (dout_array[3] is lane 0). With the last lane stored it
// pulses done_kec, which is also the stop_bit pin.
//
// The states and the signals each one asserts follow the published state
// diagram of this block. Outputs are decoded from the state (and inputs)
// without a register stage: this is this design's choice. Timing from
// trig_bit: cycles 1..16 load, cycle 17 computes round 1, rounds 2..24 in
// cycles 18..40, done_kec/stop_bit in cycle 45.
module sha3_stm
  import keccak_pkg::*;
(
  input  logic                  clk,
  input  logic                  nres,        // low-active, asynchronous
  input  logic                  start_kec,
  input  kec_in_blk_t           din_array,
  output kec_out_blk_t          dout_array,
  output logic                  done_kec,
  output logic                  trig_bit,
  output logic                  stop_bit
);

  typedef enum logic [2:0] {
    RESET_ST, INIT, ST0, ST1, END_HASH1, END_HASH2, END_HASH3
  } sha3_state_t;

  sha3_state_t st, st_nxt;

  logic        start, counter_res, counter_en, din_val, last_block;
  logic        kec_nres, write_out_en, dout_res;
  lane_t       din;
  logic [3:0]  counter_in;
  logic [1:0]  counter_out;

  logic        buffer_full, ready_n, dout_valid_n;
  lane_t       dout;

  always_comb begin
    st_nxt       = st;
    trig_bit     = 1'b0;
    start        = 1'b0;
    counter_res  = 1'b0;
    counter_en   = 1'b0;
    din          = '0;
    din_val      = 1'b0;
    last_block   = 1'b0;
    done_kec     = 1'b0;
    kec_nres     = 1'b1;
    write_out_en = 1'b0;
    dout_res     = 1'b0;
    unique case (st)
      RESET_ST: begin
        kec_nres = 1'b0;
        st_nxt   = INIT;
      end
      INIT: if (start_kec) begin
        start       = 1'b1;
        counter_res = 1'b1;
        trig_bit    = 1'b1;
        st_nxt      = ST0;
      end
      ST0: begin
        din        = din_array[counter_in];
        din_val    = 1'b1;
        counter_en = 1'b1;
        if (counter_in == 4'd0) begin
          dout_res = 1'b1;
          st_nxt   = ST1;
        end
      end
      ST1: if (!buffer_full) st_nxt = END_HASH1;
      END_HASH1: begin
        if (!ready_n) st_nxt = END_HASH2;
        else begin
          last_block  = 1'b1;
          counter_res = 1'b1;
        end
      end
      END_HASH2: if (!dout_valid_n) begin
        write_out_en = 1'b1;
        if (counter_out == 2'd0) begin
          done_kec = 1'b1;
          st_nxt   = END_HASH3;
        end else begin
          counter_en = 1'b1;
        end
      end
      END_HASH3: st_nxt = INIT;
      default:   st_nxt = RESET_ST;
    endcase
  end

  assign stop_bit = done_kec;

  always_ff @(posedge clk or negedge nres) begin
    if (!nres) begin
      st          <= RESET_ST;
      counter_in  <= '0;
      counter_out <= '0;
      dout_array  <= '0;
    end else begin
      st <= st_nxt;
      if (counter_res) begin
        counter_in  <= 4'(RATE_LANES - 1);
        counter_out <= 2'(OUT_LANES - 1);
      end else if (counter_en) begin
        counter_in  <= counter_in - 4'd1;
        counter_out <= counter_out - 2'd1;
      end
      if (dout_res)          dout_array <= '0;
      else if (write_out_en) dout_array[counter_out] <= dout;
    end
  end

  keccak_core u_keccak (
    .clk          (clk),
    .rst_n        (kec_nres),
    .start        (start),
    .din          (din),
    .din_val      (din_val),
    .buffer_full  (buffer_full),
    .last_block   (last_block),
    .ready_n      (ready_n),
    .dout         (dout),
    .dout_valid_n (dout_valid_n)
  );

endmodule
