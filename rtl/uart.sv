// uart: 8-bit, one stop bit, no parity UART transmitter and receiver.
//
// Transmit: the output register gives the byte in tx_reg[7:0] and a request
// toggle in tx_reg[8]. Whenever the toggle differs from the last one served,
// the byte is sent (start bit, 8 data bits LSB first, stop bit) as soon as
// the transmitter is idle; tx_busy is high while a frame is on the line.
// Receive: rx passes a two-flop synchronizer; a falling edge starts a frame,
// each bit is sampled in its middle, and a byte with a valid stop bit is
// delivered on rx_data with rx_ready high for one clock. rx_word is the
// value for the RW_RI register: the byte with bit 8 set, so software that
// writes 0 back after reading can tell a new byte from an old one.
// One bit lasts CLK_HZ / BAUD clocks (868 at 115200 baud and 100 MHz).
module uart #(
  parameter int unsigned CLK_HZ = 100_000_000,
  parameter int unsigned BAUD   = 115_200
) (
  input  logic        clock,
  input  logic        reset,
  // transmitter
  input  logic [15:0] tx_reg,
  output logic        tx,
  output logic        tx_busy,
  // receiver
  input  logic        rx,
  output logic [7:0]  rx_data,
  output logic        rx_ready,
  output logic [15:0] rx_word
);
  localparam int unsigned BIT_CLKS = CLK_HZ / BAUD;
  localparam int unsigned BW       = $clog2(BIT_CLKS + 1);

  // ---------------- transmitter ----------------
  logic          tx_toggle_seen;
  logic [9:0]    tx_shift;
  logic [3:0]    tx_bits;
  logic [BW-1:0] tx_cnt;

  always_ff @(posedge clock or posedge reset)
    if (reset) begin
      tx_toggle_seen <= 1'b0;
      tx_shift       <= '1;
      tx_bits        <= '0;
      tx_cnt         <= '0;
      tx_busy        <= 1'b0;
    end else if (!tx_busy) begin
      if (tx_reg[8] != tx_toggle_seen) begin
        tx_toggle_seen <= tx_reg[8];
        tx_shift       <= {1'b1, tx_reg[7:0], 1'b0};
        tx_bits        <= 4'd10;
        tx_cnt         <= BW'(BIT_CLKS - 1);
        tx_busy        <= 1'b1;
      end
    end else if (tx_cnt != '0) begin
      tx_cnt <= tx_cnt - 1'b1;
    end else begin
      tx_shift <= {1'b1, tx_shift[9:1]};
      tx_bits  <= tx_bits - 1'b1;
      tx_cnt   <= BW'(BIT_CLKS - 1);
      if (tx_bits == 4'd1) tx_busy <= 1'b0;
    end

  assign tx = tx_busy ? tx_shift[0] : 1'b1;

  // ---------------- receiver ----------------
  typedef enum logic [1:0] {RX_IDLE, RX_START, RX_DATA, RX_STOP} rx_state_e;
  rx_state_e     rx_state;
  logic [1:0]    rx_sync;
  logic [BW-1:0] rx_cnt;
  logic [2:0]    rx_idx;
  logic [7:0]    rx_shift;

  always_ff @(posedge clock or posedge reset)
    if (reset) begin
      rx_sync  <= 2'b11;
      rx_state <= RX_IDLE;
      rx_cnt   <= '0;
      rx_idx   <= '0;
      rx_shift <= '0;
      rx_data  <= '0;
      rx_ready <= 1'b0;
    end else begin
      rx_sync  <= {rx_sync[0], rx};
      rx_ready <= 1'b0;
      unique case (rx_state)
        RX_IDLE:
          if (!rx_sync[1]) begin
            rx_state <= RX_START;
            rx_cnt   <= BW'(BIT_CLKS / 2 - 1);
          end
        RX_START:
          if (rx_cnt != '0) rx_cnt <= rx_cnt - 1'b1;
          else if (rx_sync[1]) rx_state <= RX_IDLE;       // glitch, not a start bit
          else begin
            rx_state <= RX_DATA;
            rx_cnt   <= BW'(BIT_CLKS - 1);
            rx_idx   <= '0;
          end
        RX_DATA:
          if (rx_cnt != '0) rx_cnt <= rx_cnt - 1'b1;
          else begin
            rx_shift <= {rx_sync[1], rx_shift[7:1]};
            rx_cnt   <= BW'(BIT_CLKS - 1);
            rx_idx   <= rx_idx + 1'b1;
            if (rx_idx == 3'd7) rx_state <= RX_STOP;
          end
        RX_STOP:
          if (rx_cnt != '0) rx_cnt <= rx_cnt - 1'b1;
          else begin
            rx_state <= RX_IDLE;
            if (rx_sync[1]) begin
              rx_data  <= rx_shift;
              rx_ready <= 1'b1;
            end
          end
      endcase
    end

  assign rx_word = {7'b0, 1'b1, rx_data};

  logic unused;
  assign unused = ^tx_reg[15:9];
endmodule
