// logibot_top: reconfigurable peripheral manager on the FPGA of a
// BeagleBone Black expansion board.
//
// The host reaches the FPGA over its GPMC bus. gpmc_to_wishbone turns each
// GPMC transfer into a simple 16-bit Wishbone access; wb_decoder splits the
// 64K-word space by its three top address bits into four register banks and
// the memories:
//   0x0000 W_RO   output registers, write only      -> peripherals' commands
//   0x2000 WR_RO  output registers, write and read  -> digital outputs
//   0x4000 R_RI   input words, read only            <- peripherals' status
//   0x6000 RW_RI  input registers, peripheral+host  <- UART receive
//   0x8000 MEM    up to 8 dual-port memories        <-> custom memory block
// Peripherals never talk to the bus themselves; they read or fill register
// words, and reach the board ports through the in / out vectors of
// io_ports, so every peripheral can be placed on any port. What is built
// and where it goes is the configuration in logibot_cfg_pkg.
//
// Custom blocks written by the user connect where this top brings out
// custom_r_* (two W_RO words, two R_RI words, two output ports, one input
// port) and custom_m_* (port B of memory 0, one output and one input port).
// The board pins are split into pad_i / pad_o / pad_oe, and the GPMC AD pins
// into gpmc_ad_i / gpmc_ad_o / gpmc_ad_oe, for the pad buffers outside.
// clock100M is the 100 MHz FPGA clock (made from the board's 50 MHz
// oscillator by a PLL outside this module); reset is active high.
module logibot_top
  import logibot_pkg::*;
  import logibot_cfg_pkg::*;
#(
  parameter int unsigned CLK_HZ = 100_000_000
) (
  input  logic                  clock100M,
  input  logic                  reset,
  // GPMC
  input  logic                  gpmc_clk,
  input  logic [15:0]           gpmc_ad_i,
  output logic [15:0]           gpmc_ad_o,
  output logic                  gpmc_ad_oe,
  input  logic                  gpmc_advn,
  input  logic                  gpmc_csn,
  input  logic                  gpmc_oen,
  input  logic                  gpmc_wen,
  input  logic [1:0]            gpmc_ben,
  // board ports
  input  logic [NUM_PORTS-1:0]  pad_i,
  output logic [NUM_PORTS-1:0]  pad_o,
  output logic [NUM_PORTS-1:0]  pad_oe,
  // custom register block
  output logic [1:0][15:0]      custom_r_ro,
  input  logic [1:0][15:0]      custom_r_ri,
  input  logic [1:0]            custom_r_port_out,
  output logic                  custom_r_port_in,
  // custom memory block
  input  logic                  custom_m_en,
  input  logic                  custom_m_we,
  input  logic [14:0]           custom_m_addr,
  input  logic [15:0]           custom_m_din,
  output logic [15:0]           custom_m_dout,
  input  logic                  custom_m_port_out,
  output logic                  custom_m_port_in
);
  // ---------------- bus ----------------
  wb_req_t     wb;
  logic [15:0] wb_rddata, rd_wr_ro, rd_r_ri, rd_rw_ri, rd_mem;
  logic        sel_w_ro, sel_wr_ro, sel_rw_ri, sel_mem;

  gpmc_to_wishbone u_gpmc (
    .fpga_clk   (clock100M),
    .reset      (reset),
    .gpmc_clk   (gpmc_clk),
    .gpmc_ad_i  (gpmc_ad_i),
    .gpmc_ad_o  (gpmc_ad_o),
    .gpmc_ad_oe (gpmc_ad_oe),
    .gpmc_advn  (gpmc_advn),
    .gpmc_csn   (gpmc_csn),
    .gpmc_oen   (gpmc_oen),
    .gpmc_wen   (gpmc_wen),
    .gpmc_ben   (gpmc_ben),
    .wb         (wb),
    .wb_rddata  (wb_rddata)
  );

  wb_decoder u_dec (
    .wb        (wb),
    .sel_w_ro  (sel_w_ro),
    .sel_wr_ro (sel_wr_ro),
    .sel_r_ri  (),           // R_RI is a pure read mux, no select needed
    .sel_rw_ri (sel_rw_ri),
    .sel_mem   (sel_mem),
    .rd_wr_ro  (rd_wr_ro),
    .rd_r_ri   (rd_r_ri),
    .rd_rw_ri  (rd_rw_ri),
    .rd_mem    (rd_mem),
    .rddata    (wb_rddata)
  );

  // ---------------- registers and memories ----------------
  logic [W_WIDTH_OUTPUT*16-1:0]  w_ro_bus;
  logic [WR_WIDTH_OUTPUT*16-1:0] wr_ro_bus;
  logic [WIDTH_INPUT*16-1:0]     r_ri_bus;
  logic [WIDTH_INPUT_W*16-1:0]   rw_ri_bus;
  logic [WIDTH_INPUT_W-1:0]      rw_ri_en;

  // 16-bit views of the flattened buses
  logic [15:0] W_RO  [W_WIDTH_OUTPUT];
  logic [15:0] WR_RO [WR_WIDTH_OUTPUT];
  logic [15:0] RI    [WIDTH_INPUT];
  logic [15:0] RW_RI [WIDTH_INPUT_W];

  for (genvar g = 0; g < W_WIDTH_OUTPUT; g++) begin : g_w_ro
    assign W_RO[g] = w_ro_bus[g*16 +: 16];
  end
  for (genvar g = 0; g < WR_WIDTH_OUTPUT; g++) begin : g_wr_ro
    assign WR_RO[g] = wr_ro_bus[g*16 +: 16];
  end
  for (genvar g = 0; g < WIDTH_INPUT; g++) begin : g_r_ri
    assign r_ri_bus[g*16 +: 16] = RI[g];
  end
  for (genvar g = 0; g < WIDTH_INPUT_W; g++) begin : g_rw_ri
    assign rw_ri_bus[g*16 +: 16] = RW_RI[g];
  end

  w_ro #(.WIDTH_OUTPUT(W_WIDTH_OUTPUT)) u_w_ro (
    .clock (clock100M), .reset (reset), .wb (wb), .sel (sel_w_ro), .r_o (w_ro_bus)
  );

  wr_ro #(.WR_WIDTH_OUTPUT(WR_WIDTH_OUTPUT)) u_wr_ro (
    .clock (clock100M), .reset (reset), .wb (wb), .sel (sel_wr_ro),
    .r_o (wr_ro_bus), .rddata (rd_wr_ro)
  );

  r_ri #(.WIDTH_INPUT(WIDTH_INPUT)) u_r_ri (
    .wb (wb), .ri (r_ri_bus), .rddata (rd_r_ri)
  );

  rw_ri #(.WIDTH_INPUT_W(WIDTH_INPUT_W)) u_rw_ri (
    .clock (clock100M), .reset (reset), .wb (wb), .sel (sel_rw_ri),
    .ri (rw_ri_bus), .en (rw_ri_en), .rddata (rd_rw_ri)
  );

  logic [MEM_NUMBER-1:0]       mb_en, mb_we;
  logic [MEM_NUMBER-1:0][14:0] mb_addr;
  logic [MEM_NUMBER-1:0][15:0] mb_din, mb_dout;

  mem_bank #(.MEM_NUMBER(MEM_NUMBER), .MEM_SIZE(MEM_SIZE), .MEM_WIDTH(MEM_WIDTH)) u_mem (
    .clock (clock100M), .reset (reset), .wb (wb), .sel (sel_mem), .rddata (rd_mem),
    .b_en (mb_en), .b_we (mb_we), .b_addr (mb_addr), .b_din (mb_din), .b_dout (mb_dout)
  );

  // ---------------- ports ----------------
  logic [NUM_PORTS-1:0] in, out;

  io_ports #(.NUM_PORTS(NUM_PORTS), .PORT_IS_OUT(PORT_IS_OUT)) u_ports (
    .out (out), .in (in), .pad_i (pad_i), .pad_o (pad_o), .pad_oe (pad_oe)
  );

  // ---------------- peripherals ----------------
  pwm_uni #(.CLK_HZ(CLK_HZ), .PWM_HZ(PWMU0_HZ)) u_pwmu0 (
    .clock (clock100M), .reset (reset), .cmd (W_RO[PWMU0_RO]), .pwm_out (out[PWMU0_PORT])
  );

  pwm_uni #(.CLK_HZ(CLK_HZ), .PWM_HZ(PWMU1_HZ)) u_pwmu1 (
    .clock (clock100M), .reset (reset), .cmd (W_RO[PWMU1_RO]), .pwm_out (out[PWMU1_PORT])
  );

  logic [3:0] hb;
  pwm_hbridge #(.CLK_HZ(CLK_HZ), .PWM_HZ(PWMH0_HZ)) u_pwmh0 (
    .clock (clock100M), .reset (reset), .cmd (W_RO[PWMH0_RO]), .s (hb)
  );
  for (genvar i = 0; i < 4; i++) begin : g_hb
    assign out[PWMH0_PORT[i]] = hb[i];
  end

  logic [7:0] uart_rx_data;
  logic       uart_tx_busy;
  uart #(.CLK_HZ(CLK_HZ), .BAUD(UART0_BAUD)) u_uart0 (
    .clock    (clock100M),
    .reset    (reset),
    .tx_reg   (W_RO[UART0_RO]),
    .tx       (out[UART0_TX_PORT]),
    .tx_busy  (uart_tx_busy),
    .rx       (in[UART0_RX_PORT]),
    .rx_data  (uart_rx_data),
    .rx_ready (rw_ri_en[UART0_RWRI]),
    .rx_word  (RW_RI[UART0_RWRI])
  );

  logic [15:0] spi_rx;
  logic        spi_busy, spi_done;
  spi_master #(.CLK_HZ(CLK_HZ), .SCLK_HZ(SPI0_SCLK_HZ), .N_BITS(SPI0_BITS)) u_spi0 (
    .clock    (clock100M),
    .reset    (reset),
    .tx_reg   (W_RO[SPI0_TX_RO]),
    .ctrl_reg (W_RO[SPI0_CTRL_RO]),
    .rx_data  (spi_rx),
    .busy     (spi_busy),
    .done     (spi_done),
    .sclk     (out[SPI0_SCLK_PORT]),
    .sdo      (out[SPI0_SDO_PORT]),
    .sdi      (in[SPI0_SDI_PORT]),
    .cs_n     (out[SPI0_CS_PORT])
  );
  assign RI[SPI0_RX_RI]   = spi_rx;
  assign RI[SPI0_STAT_RI] = {15'b0, spi_busy};

  servo_ctrl #(.CLK_HZ(CLK_HZ)) u_servo0 (
    .clock (clock100M), .reset (reset), .width_us (W_RO[SERVO0_RO]), .servo_out (out[SERVO0_PORT])
  );

  digital_in #(.N(1)) u_din (
    .clock (clock100M), .reset (reset), .pins (in[DIN0_PORT]), .word (RI[DIN_RI])
  );
  assign out[DOUT0_PORT] = WR_RO[DOUT_WR][DOUT_BIT];

  // Fixed words 0 and 1 are produced inside r_ri.
  assign RI[0] = '0;
  assign RI[1] = '0;

  // ---------------- custom blocks ----------------
  assign custom_r_ro[0]             = W_RO[CUSTOM0_RO[0]];
  assign custom_r_ro[1]             = W_RO[CUSTOM0_RO[1]];
  assign RI[CUSTOM0_RI[0]]          = custom_r_ri[0];
  assign RI[CUSTOM0_RI[1]]          = custom_r_ri[1];
  assign out[CUSTOM0_OUT_PORT[0]]   = custom_r_port_out[0];
  assign out[CUSTOM0_OUT_PORT[1]]   = custom_r_port_out[1];
  assign custom_r_port_in           = in[CUSTOM0_IN_PORT];

  assign mb_en[CUSTOM0_MEM]         = custom_m_en;
  assign mb_we[CUSTOM0_MEM]         = custom_m_we;
  assign mb_addr[CUSTOM0_MEM]       = custom_m_addr;
  assign mb_din[CUSTOM0_MEM]        = custom_m_din;
  assign custom_m_dout              = mb_dout[CUSTOM0_MEM];
  assign out[CUSTOM0_MEM_OUT_PORT]  = custom_m_port_out;
  assign custom_m_port_in           = in[CUSTOM0_MEM_IN_PORT];

  // Input ports carry no out value.
  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_unused_out
    if (!PORT_IS_OUT[p]) begin : g_in_only
      assign out[p] = 1'b0;
    end
  end

  // Status not mapped to a register in this configuration.
  logic unused;
  assign unused = uart_tx_busy ^ spi_done ^ ^uart_rx_data;
endmodule
