// uart: 8N1 serial transmitter and receiver with byte handshakes.
//
// Receiver: the rx line is synchronised by two flip-flops and sampled at
// OVERSAMPLE times the baud rate. A low level held for half a bit starts a
// frame; the eight data bits (LSB first) and the stop bit are then sampled
// in the middle of each bit. A frame with a valid stop bit is placed on
// data_out and data_out_stb is raised until data_out_ack is pulsed. A frame
// that arrives while data_out_stb is still high overwrites data_out.
//
// Transmitter: while idle, data_in_stb high hands data_in over; the frame
// (start bit, 8 data bits LSB first, stop bit) is sent and data_in_ack is
// pulsed for one cycle once the stop bit is complete, i.e. when the byte is
// fully transmitted. The sender holds data_in_stb until it sees the ack.
//
// The 16x oversampling, the 115200 baud rate and the 18.432 MHz clock are
// the design's figures; the strobe/ack handshake names follow the serial
// state machine that drives this block. The internals are this design's
// own. One bit lasts CLK_HZ / BAUD cycles (160 at the defaults).
module uart #(
  parameter int unsigned CLK_HZ     = 18_432_000,
  parameter int unsigned BAUD       = 115_200,
  parameter int unsigned OVERSAMPLE = 16
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rx,
  output logic       tx,
  input  logic [7:0] data_in,
  input  logic       data_in_stb,
  output logic       data_in_ack,
  output logic [7:0] data_out,
  output logic       data_out_stb,
  input  logic       data_out_ack
);

  localparam int unsigned TICK_DIV = CLK_HZ / (BAUD * OVERSAMPLE);
  localparam int unsigned BIT_CYC  = TICK_DIV * OVERSAMPLE;

  // ---------------- receiver ----------------
  typedef enum logic [1:0] {RX_IDLE, RX_START, RX_DATA, RX_STOP} rx_state_t;
  rx_state_t   rx_st;
  logic [1:0]  rx_sync;
  logic        rx_s;
  logic [15:0] rx_tick_cnt;   // cycles within one oversample tick
  logic [4:0]  rx_os_cnt;     // oversample ticks within one bit
  logic [2:0]  rx_bit;
  logic [7:0]  rx_shift;
  logic        rx_tick;

  assign rx_s    = rx_sync[1];
  assign rx_tick = (rx_tick_cnt == 16'(TICK_DIV - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_sync      <= 2'b11;
      rx_st        <= RX_IDLE;
      rx_tick_cnt  <= '0;
      rx_os_cnt    <= '0;
      rx_bit       <= '0;
      rx_shift     <= '0;
      data_out     <= '0;
      data_out_stb <= 1'b0;
    end else begin
      rx_sync <= {rx_sync[0], rx};
      if (data_out_ack) data_out_stb <= 1'b0;

      if (rx_st == RX_IDLE || rx_tick) rx_tick_cnt <= '0;
      else                             rx_tick_cnt <= rx_tick_cnt + 16'd1;

      unique case (rx_st)
        RX_IDLE: if (!rx_s) begin
          rx_st     <= RX_START;
          rx_os_cnt <= '0;
        end
        RX_START: if (rx_tick) begin
          rx_os_cnt <= rx_os_cnt + 5'd1;
          if (rx_os_cnt == 5'(OVERSAMPLE / 2 - 1)) begin
            rx_os_cnt <= '0;
            rx_bit    <= '0;
            rx_st     <= rx_s ? RX_IDLE : RX_DATA;   // glitch: back to idle
          end
        end
        RX_DATA: if (rx_tick) begin
          rx_os_cnt <= rx_os_cnt + 5'd1;
          if (rx_os_cnt == 5'(OVERSAMPLE - 1)) begin
            rx_os_cnt <= '0;
            rx_shift  <= {rx_s, rx_shift[7:1]};
            rx_bit    <= rx_bit + 3'd1;
            if (rx_bit == 3'd7) rx_st <= RX_STOP;
          end
        end
        RX_STOP: if (rx_tick) begin
          rx_os_cnt <= rx_os_cnt + 5'd1;
          if (rx_os_cnt == 5'(OVERSAMPLE - 1)) begin
            rx_st <= RX_IDLE;
            if (rx_s) begin
              data_out     <= rx_shift;
              data_out_stb <= 1'b1;
            end
          end
        end
        default: rx_st <= RX_IDLE;
      endcase
    end
  end

  // ---------------- transmitter ----------------
  logic [9:0]  tx_shift;      // {stop, data, start}, LSB goes out first
  logic [3:0]  tx_bits_left;
  logic [15:0] tx_cyc;
  logic        tx_busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_shift     <= '1;
      tx_bits_left <= '0;
      tx_cyc       <= '0;
      tx_busy      <= 1'b0;
      data_in_ack  <= 1'b0;
    end else begin
      data_in_ack <= 1'b0;
      if (!tx_busy) begin
        if (data_in_stb && !data_in_ack) begin
          tx_shift     <= {1'b1, data_in, 1'b0};
          tx_bits_left <= 4'd10;
          tx_cyc       <= '0;
          tx_busy      <= 1'b1;
        end
      end else if (tx_cyc == 16'(BIT_CYC - 1)) begin
        tx_cyc       <= '0;
        tx_shift     <= {1'b1, tx_shift[9:1]};
        tx_bits_left <= tx_bits_left - 4'd1;
        if (tx_bits_left == 4'd1) begin
          tx_busy     <= 1'b0;
          data_in_ack <= 1'b1;
        end
      end else begin
        tx_cyc <= tx_cyc + 16'd1;
      end
    end
  end

  assign tx = tx_busy ? tx_shift[0] : 1'b1;

endmodule
