// rs232_stm: serial communication block. A state machine around the UART
// that exchanges fixed-length messages with the host.
//
// After reset it sends one reset byte (8'h20, an ASCII space) so the host
// can see that the device came up. Then, on start_recv, it clears the
// input message register and receives IN_BYTES (128) bytes; each byte is
// stored, acknowledged to the UART and the input counter decremented. The
// first byte on the line lands in rs_dout[127], the last in rs_dout[0].
// It then holds done_recv high until start_trans, and sends OUT_BYTES (32)
// bytes rs_din[31] down to rs_din[0], waiting for each to be fully
// transmitted. done_trans is pulsed for one cycle at the end and the
// machine returns to idle.
//
// States and the signals each asserts follow the published state diagram.
// This design's choices: both counters are preset to the index of the
// first byte (127 and 31) and tested for zero before the decrement, so
// that exactly 128 and 32 bytes are moved; the outputs are decoded from
// the state without registers. The counters are also preset throughout
// the idle wait, as well as in the states that lead into it.
module rs232_stm
  import keccak_pkg::*;
#(
  parameter int unsigned CLK_HZ = 18_432_000,
  parameter int unsigned BAUD   = 115_200
) (
  input  logic        clk,
  input  logic        nres,
  input  logic        rx,
  output logic        tx,
  input  logic        start_recv,
  input  logic        start_trans,
  output logic        done_recv,
  output logic        done_trans,
  output rs_in_msg_t  rs_dout,
  input  rs_out_msg_t rs_din
);

  localparam byte_t RESET_BYTE = 8'h20;

  typedef enum logic [3:0] {
    S_INIT, S_SEND_RESET_SIG, S_IDLE,
    S_RES_COUNT_IN, S_RS_RECEIVE, S_SAFE_BYTE_IN, S_ACK_IN_BYTE,
    S_DECR_COUNT_IN, S_DONE_RECV,
    S_SEND_BYTE_OUT, S_IF_ALL_BYTES_OUT, S_DECR_COUNT_OUT, S_DONE_TRANS
  } rs_state_t;

  rs_state_t st, st_nxt;

  byte_t uart_data_in, uart_data_out;
  logic  uart_data_in_stb, uart_data_in_ack;
  logic  uart_data_out_stb, uart_data_out_ack;
  logic  mes_count_en, mes_count_res, write_ram_en, dout_res;
  logic [$clog2(IN_BYTES)-1:0]  mes_count_in;
  logic [$clog2(OUT_BYTES)-1:0] mes_count_out;

  always_comb begin
    st_nxt            = st;
    done_recv         = 1'b0;
    done_trans        = 1'b0;
    uart_data_out_ack = 1'b0;
    uart_data_in_stb  = 1'b0;
    uart_data_in      = '0;
    mes_count_en      = 1'b0;
    mes_count_res     = 1'b0;
    write_ram_en      = 1'b0;
    dout_res          = 1'b0;
    unique case (st)
      S_INIT: begin
        mes_count_res = 1'b1;
        st_nxt        = S_SEND_RESET_SIG;
      end
      S_SEND_RESET_SIG: begin
        uart_data_in_stb = 1'b1;
        uart_data_in     = RESET_BYTE;
        if (uart_data_in_ack) st_nxt = S_IDLE;
      end
      S_IDLE: begin
        mes_count_res = 1'b1;
        if (start_recv) st_nxt = S_RES_COUNT_IN;
      end
      S_RES_COUNT_IN: begin
        dout_res = 1'b1;
        st_nxt   = S_RS_RECEIVE;
      end
      S_RS_RECEIVE: if (uart_data_out_stb) st_nxt = S_SAFE_BYTE_IN;
      S_SAFE_BYTE_IN: begin
        write_ram_en = 1'b1;
        st_nxt       = S_ACK_IN_BYTE;
      end
      S_ACK_IN_BYTE: begin
        uart_data_out_ack = 1'b1;
        st_nxt = (mes_count_in == '0) ? S_DONE_RECV : S_DECR_COUNT_IN;
      end
      S_DECR_COUNT_IN: begin
        mes_count_en = 1'b1;
        st_nxt       = S_RS_RECEIVE;
      end
      S_DONE_RECV: begin
        done_recv     = 1'b1;
        mes_count_res = 1'b1;
        if (start_trans) st_nxt = S_SEND_BYTE_OUT;
      end
      S_SEND_BYTE_OUT: begin
        uart_data_in_stb = 1'b1;
        uart_data_in     = rs_din[mes_count_out];
        if (uart_data_in_ack) st_nxt = S_IF_ALL_BYTES_OUT;
      end
      S_IF_ALL_BYTES_OUT:
        st_nxt = (mes_count_out == '0) ? S_DONE_TRANS : S_DECR_COUNT_OUT;
      S_DECR_COUNT_OUT: begin
        mes_count_en = 1'b1;
        st_nxt       = S_SEND_BYTE_OUT;
      end
      S_DONE_TRANS: begin
        mes_count_res = 1'b1;
        done_trans    = 1'b1;
        st_nxt        = S_IDLE;
      end
      default: st_nxt = S_INIT;
    endcase
  end

  always_ff @(posedge clk or negedge nres) begin
    if (!nres) begin
      st            <= S_INIT;
      mes_count_in  <= '0;
      mes_count_out <= '0;
      rs_dout       <= '0;
    end else begin
      st <= st_nxt;
      if (mes_count_res) begin
        mes_count_in  <= '1;   // IN_BYTES - 1
        mes_count_out <= '1;   // OUT_BYTES - 1
      end else if (mes_count_en) begin
        mes_count_in  <= mes_count_in - 1'b1;
        mes_count_out <= mes_count_out - 1'b1;
      end
      if (dout_res)          rs_dout <= '0;
      else if (write_ram_en) rs_dout[mes_count_in] <= uart_data_out;
    end
  end

  // UART handshake rules: a send request is held until acknowledged, and a
  // received byte is only acknowledged while it is offered.
  a_in_stb_held: assert property (@(posedge clk) disable iff (!nres)
    uart_data_in_stb && !uart_data_in_ack |=> uart_data_in_stb);
  a_out_ack_valid: assert property (@(posedge clk) disable iff (!nres)
    uart_data_out_ack |-> uart_data_out_stb);

  uart #(.CLK_HZ(CLK_HZ), .BAUD(BAUD), .OVERSAMPLE(16)) u_uart (
    .clk          (clk),
    .rst_n        (nres),
    .rx           (rx),
    .tx           (tx),
    .data_in      (uart_data_in),
    .data_in_stb  (uart_data_in_stb),
    .data_in_ack  (uart_data_in_ack),
    .data_out     (uart_data_out),
    .data_out_stb (uart_data_out_stb),
    .data_out_ack (uart_data_out_ack)
  );

endmodule
