// control_stm: top-level sequencer of the hash device.
//
// A ring of six states: init -> rs_receive (start_recv held until the
// serial block reports done_recv) -> conv_r2k (one cycle, converter packs
// the bytes into lanes) -> dokeccak (start_kec held until done_kec) ->
// conv_k2r (one cycle, converter unpacks the result) -> rs_transceive
// (start_trans held until done_trans) -> init. Outputs depend only on the
// state. The states, their outputs and transitions follow the published
// state diagram; the one-hot conversion enables are this design's way of
// letting the converter act in the two conversion states.
module control_stm (
  input  logic clk,
  input  logic nres,
  input  logic done_recv,
  input  logic done_kec,
  input  logic done_trans,
  output logic start_recv,
  output logic start_kec,
  output logic start_trans,
  output logic conv_r2k,
  output logic conv_k2r
);

  typedef enum logic [2:0] {
    C_INIT, C_RS_RECEIVE, C_CONV_R2K, C_DOKECCAK, C_CONV_K2R, C_RS_TRANSCEIVE
  } ctrl_state_t;

  ctrl_state_t st, st_nxt;

  always_comb begin
    st_nxt = st;
    unique case (st)
      C_INIT:          st_nxt = C_RS_RECEIVE;
      C_RS_RECEIVE:    if (done_recv)  st_nxt = C_CONV_R2K;
      C_CONV_R2K:      st_nxt = C_DOKECCAK;
      C_DOKECCAK:      if (done_kec)   st_nxt = C_CONV_K2R;
      C_CONV_K2R:      st_nxt = C_RS_TRANSCEIVE;
      C_RS_TRANSCEIVE: if (done_trans) st_nxt = C_INIT;
      default:         st_nxt = C_INIT;
    endcase
  end

  always_ff @(posedge clk or negedge nres) begin
    if (!nres) st <= C_INIT;
    else       st <= st_nxt;
  end

  // At most one phase is active at a time.
  a_one_phase: assert property (@(posedge clk) disable iff (!nres)
    (3'(start_recv) + 3'(start_kec) + 3'(start_trans) + 3'(conv_r2k) + 3'(conv_k2r)) <= 3'd1);

  assign start_recv  = (st == C_RS_RECEIVE);
  assign start_kec   = (st == C_DOKECCAK);
  assign start_trans = (st == C_RS_TRANSCEIVE);
  assign conv_r2k    = (st == C_CONV_R2K);
  assign conv_k2r    = (st == C_CONV_K2R);

endmodule
