// UART of the case-study system: 8 data bits, no parity, one stop bit.
//
// Transmitter: a one-cycle transmit pulse while idle loads tx_byte into a
// shift register and sends start bit, bits 0..7 (LSB first) and stop bit
// on txd, each CLKS_PER_BIT clk cycles long; tx_busy is high from the
// cycle after the pulse until the stop bit ends. A transmit pulse while busy
// is ignored.
// Receiver: rxd passes a two-flop synchronizer. A falling edge while idle
// starts a frame; the start bit is checked half a bit later and each data
// bit and the stop bit are sampled in the middle of their bit time. With a
// valid (high) stop bit the byte is written to rx_byte and received pulses
// for one cycle, in the middle of the stop bit. rx_byte keeps the byte until
// the next frame ends, so another clock domain may read it once it has seen
// the received event. A frame with a low stop bit is discarded.
//
// The ports transmit, tx_byte, received and rx_byte follow the UART block
// of the system diagram; the frame format, the bit rate (CLKS_PER_BIT = 104
// gives 115200 baud at the 12 MHz main clock), tx_busy, the serial pins and
// the asynchronous active-low reset are this design's choices. The bit rate
// scales with the frequency the PMU gives this clock domain.
module uart #(
  parameter int unsigned CLKS_PER_BIT = 104
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       transmit,
  input  logic [7:0] tx_byte,
  output logic       received,
  output logic [7:0] rx_byte,
  output logic       tx_busy,
  input  logic       rxd,
  output logic       txd
);

  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);

  // ---------------- transmitter ----------------
  logic [9:0]    tx_shift;          // {stop, data[7:0], start}, LSB goes first
  logic [3:0]    tx_bits_left;
  logic [CW-1:0] tx_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_shift     <= '1;
      tx_bits_left <= '0;
      tx_cnt       <= '0;
      tx_busy      <= 1'b0;
    end else if (!tx_busy) begin
      if (transmit) begin
        tx_shift     <= {1'b1, tx_byte, 1'b0};
        tx_bits_left <= 4'd10;
        tx_cnt       <= CW'(CLKS_PER_BIT - 1);
        tx_busy      <= 1'b1;
      end
    end else if (tx_cnt != 0) begin
      tx_cnt <= tx_cnt - 1'b1;
    end else begin
      tx_shift     <= {1'b1, tx_shift[9:1]};
      tx_bits_left <= tx_bits_left - 1'b1;
      tx_cnt       <= CW'(CLKS_PER_BIT - 1);
      if (tx_bits_left == 4'd1)
        tx_busy <= 1'b0;
    end
  end

  assign txd = tx_busy ? tx_shift[0] : 1'b1;

  // ---------------- receiver ----------------
  typedef enum logic [1:0] {RX_IDLE, RX_START, RX_DATA, RX_STOP} rx_state_e;

  rx_state_e     rx_state;
  logic [1:0]    rxd_sync;
  logic [CW-1:0] rx_cnt;
  logic [2:0]    rx_bit;
  logic [7:0]    rx_shift;
  logic          rxd_s;

  assign rxd_s = rxd_sync[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rxd_sync <= 2'b11;
      rx_state <= RX_IDLE;
      rx_cnt   <= '0;
      rx_bit   <= '0;
      rx_shift <= '0;
      rx_byte  <= '0;
      received <= 1'b0;
    end else begin
      rxd_sync <= {rxd_sync[0], rxd};
      received <= 1'b0;
      unique case (rx_state)
        RX_IDLE: if (!rxd_s) begin
          rx_state <= RX_START;
          rx_cnt   <= CW'(CLKS_PER_BIT / 2 - 1);
        end
        RX_START: if (rx_cnt != 0) rx_cnt <= rx_cnt - 1'b1;
          else if (rxd_s) rx_state <= RX_IDLE;        // glitch, not a start bit
          else begin
            rx_state <= RX_DATA;
            rx_cnt   <= CW'(CLKS_PER_BIT - 1);
            rx_bit   <= '0;
          end
        RX_DATA: if (rx_cnt != 0) rx_cnt <= rx_cnt - 1'b1;
          else begin
            rx_shift <= {rxd_s, rx_shift[7:1]};
            rx_cnt   <= CW'(CLKS_PER_BIT - 1);
            rx_bit   <= rx_bit + 1'b1;
            if (rx_bit == 3'd7) rx_state <= RX_STOP;
          end
        RX_STOP: if (rx_cnt != 0) rx_cnt <= rx_cnt - 1'b1;
          else begin
            rx_state <= RX_IDLE;
            if (rxd_s) begin
              rx_byte  <= rx_shift;
              received <= 1'b1;
            end
          end
        default: rx_state <= RX_IDLE;
      endcase
    end
  end

  initial assert (CLKS_PER_BIT >= 4) else $error("uart: CLKS_PER_BIT must be at least 4");

endmodule
