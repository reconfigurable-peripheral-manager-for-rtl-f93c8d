// spi_master: SPI master for 8- or 16-bit transfers (N_BITS).
//
// Signals: sclk, sdo (master out), sdi (master in), cs_n. Mode 0: sclk idles
// low, sdo changes on the falling edge and sdi is sampled on the rising
// edge, most significant bit first. A transfer starts when ctrl_reg[0]
// toggles (compared with the last toggle served) and the master is idle:
// cs_n falls, N_BITS clock pulses of SCLK_HZ follow, cs_n rises and the
// received word appears on rx_data (right-aligned) with done high for one
// clock. busy is high from the start request to the end of the transfer.
// The word sent is tx_reg[N_BITS-1:0].
module spi_master #(
  parameter int unsigned CLK_HZ  = 100_000_000,
  parameter int unsigned SCLK_HZ = 1_000_000,
  parameter int unsigned N_BITS  = 16
) (
  input  logic        clock,
  input  logic        reset,
  input  logic [15:0] tx_reg,
  input  logic [15:0] ctrl_reg,
  output logic [15:0] rx_data,
  output logic        busy,
  output logic        done,
  output logic        sclk,
  output logic        sdo,
  input  logic        sdi,
  output logic        cs_n
);
  localparam int unsigned HALF = CLK_HZ / SCLK_HZ / 2;   // clocks per half period
  localparam int unsigned HW   = $clog2(HALF + 1);

  if (N_BITS != 8 && N_BITS != 16) begin : g_bad_bits
    $error("spi_master: N_BITS must be 8 or 16");
  end

  typedef enum logic [1:0] {S_IDLE, S_SETUP, S_HIGH, S_LOW} spi_state_e;
  spi_state_e        state;
  logic              toggle_seen;
  logic [N_BITS-1:0] sh_tx, sh_rx;
  logic [4:0]        bits;
  logic [HW-1:0]     cnt;

  always_ff @(posedge clock or posedge reset)
    if (reset) begin
      state       <= S_IDLE;
      toggle_seen <= 1'b0;
      sh_tx       <= '0;
      sh_rx       <= '0;
      bits        <= '0;
      cnt         <= '0;
      rx_data     <= '0;
      done        <= 1'b0;
      sclk        <= 1'b0;
      cs_n        <= 1'b1;
    end else begin
      done  <= 1'b0;
      unique case (state)
        S_IDLE:
          if (ctrl_reg[0] != toggle_seen) begin
            toggle_seen <= ctrl_reg[0];
            sh_tx       <= tx_reg[N_BITS-1:0];
            bits        <= 5'(N_BITS);
            cs_n        <= 1'b0;
            cnt         <= HW'(HALF - 1);
            state       <= S_SETUP;
          end
        S_SETUP:                         // first data bit settles on sdo
          if (cnt != '0) cnt <= cnt - 1'b1;
          else begin
            sclk  <= 1'b1;
            cnt   <= HW'(HALF - 1);
            state <= S_HIGH;
          end
        S_HIGH:                          // rising edge just happened
          if (cnt == HW'(HALF - 1)) begin
            sh_rx <= {sh_rx[N_BITS-2:0], sdi};
            cnt   <= cnt - 1'b1;
          end else if (cnt != '0) cnt <= cnt - 1'b1;
          else begin
            sclk  <= 1'b0;
            bits  <= bits - 1'b1;
            cnt   <= HW'(HALF - 1);
            state <= S_LOW;
            if (bits != 5'd1) sh_tx <= {sh_tx[N_BITS-2:0], 1'b0};
          end
        S_LOW:
          if (cnt != '0) cnt <= cnt - 1'b1;
          else if (bits == '0) begin
            cs_n    <= 1'b1;
            rx_data <= 16'(sh_rx);
            done    <= 1'b1;
            state   <= S_IDLE;
          end else begin
            sclk  <= 1'b1;
            cnt   <= HW'(HALF - 1);
            state <= S_HIGH;
          end
      endcase
    end

  assign sdo  = cs_n ? 1'b0 : sh_tx[N_BITS-1];
  assign busy = (state != S_IDLE) || (ctrl_reg[0] != toggle_seen);

  logic unused;
  assign unused = ^ctrl_reg[15:1] ^ ((N_BITS == 8) ? ^tx_reg : 1'b0);
endmodule
