// logibot_cfg_pkg: the build configuration of logibot_top.
//
// This package plays the part of the generated parameter file: it says how
// many registers and memories exist, which register each peripheral uses
// and which board port each peripheral signal goes to. The configuration
// here is the reference set of peripherals:
//   PWMU (20K, ARD_0)          DIGITAL_IN (PMOD2_5)
//   UART (115200, PMOD1_2, PMOD2_6)                 DIGITAL_OUT (PMOD1_3)
//   PWMH (20K, PMOD2_2, PMOD2_3, PMOD2_4, PMOD2_7)  PWMU (20K, ARD_1)
//   CUSTOM_R (2, 2, 2, PMOD1_5, PMOD1_7, 1, ARD_2)
//   CUSTOM_M (512, 8, 1, PMOD1_6, 1, ARD_3)
//   SPI (16, PMOD1_0, PMOD1_1, ARD_4, PMOD2_0)      SERVO_CONTROL (ARD_5)
// Port numbers: PMOD1_k = k, PMOD2_k = 8 + k, ARD_k = 16 + k.
// Register numbers are indices inside each region (word address =
// region base + index): W_RO at 0x0000, WR_RO at 0x2000, R_RI at 0x4000,
// RW_RI at 0x6000.
package logibot_cfg_pkg;

  localparam int unsigned NUM_PORTS = 22;

  // Ports
  localparam int unsigned P_PMOD1_0 = 0,  P_PMOD1_1 = 1,  P_PMOD1_2 = 2,
                          P_PMOD1_3 = 3,  P_PMOD1_5 = 5,  P_PMOD1_6 = 6,
                          P_PMOD1_7 = 7,  P_PMOD2_0 = 8,  P_PMOD2_2 = 10,
                          P_PMOD2_3 = 11, P_PMOD2_4 = 12, P_PMOD2_5 = 13,
                          P_PMOD2_6 = 14, P_PMOD2_7 = 15, P_ARD_0   = 16,
                          P_ARD_1   = 17, P_ARD_2   = 18, P_ARD_3   = 19,
                          P_ARD_4   = 20, P_ARD_5   = 21;

  localparam int unsigned PWMU0_PORT    = P_ARD_0;
  localparam int unsigned PWMU1_PORT    = P_ARD_1;
  localparam int unsigned PWMH0_PORT[4] = '{P_PMOD2_2, P_PMOD2_3, P_PMOD2_4, P_PMOD2_7};
  localparam int unsigned UART0_TX_PORT = P_PMOD1_2;
  localparam int unsigned UART0_RX_PORT = P_PMOD2_6;
  localparam int unsigned DIN0_PORT     = P_PMOD2_5;
  localparam int unsigned DOUT0_PORT    = P_PMOD1_3;
  localparam int unsigned SPI0_SCLK_PORT = P_PMOD1_0;
  localparam int unsigned SPI0_SDO_PORT  = P_PMOD1_1;
  localparam int unsigned SPI0_SDI_PORT  = P_ARD_4;
  localparam int unsigned SPI0_CS_PORT   = P_PMOD2_0;
  localparam int unsigned SERVO0_PORT    = P_ARD_5;
  localparam int unsigned CUSTOM0_OUT_PORT[2] = '{P_PMOD1_5, P_PMOD1_7};
  localparam int unsigned CUSTOM0_IN_PORT     = P_ARD_2;
  localparam int unsigned CUSTOM0_MEM_OUT_PORT = P_PMOD1_6;
  localparam int unsigned CUSTOM0_MEM_IN_PORT  = P_ARD_3;

  // Ports driven by the FPGA; every other port is an input.
  function automatic logic [NUM_PORTS-1:0] port_is_out();
    logic [NUM_PORTS-1:0] o = '0;
    o[PWMU0_PORT] = 1'b1;     o[PWMU1_PORT] = 1'b1;
    for (int i = 0; i < 4; i++) o[PWMH0_PORT[i]] = 1'b1;
    o[UART0_TX_PORT] = 1'b1;  o[DOUT0_PORT] = 1'b1;
    o[SPI0_SCLK_PORT] = 1'b1; o[SPI0_SDO_PORT] = 1'b1; o[SPI0_CS_PORT] = 1'b1;
    o[SERVO0_PORT] = 1'b1;
    o[CUSTOM0_OUT_PORT[0]] = 1'b1; o[CUSTOM0_OUT_PORT[1]] = 1'b1;
    o[CUSTOM0_MEM_OUT_PORT] = 1'b1;
    return o;
  endfunction
  localparam logic [NUM_PORTS-1:0] PORT_IS_OUT = port_is_out();

  // W_RO: write-only output registers
  localparam int unsigned W_WIDTH_OUTPUT   = 9;
  localparam int unsigned PWMU0_RO         = 0;
  localparam int unsigned PWMU1_RO         = 1;
  localparam int unsigned PWMH0_RO         = 2;
  localparam int unsigned UART0_RO         = 3;  // [7:0] byte, [8] send toggle
  localparam int unsigned SPI0_TX_RO       = 4;
  localparam int unsigned SPI0_CTRL_RO     = 5;  // [0] start toggle
  localparam int unsigned SERVO0_RO        = 6;  // pulse width in us
  localparam int unsigned CUSTOM0_RO[2]    = '{7, 8};

  // WR_RO: output registers that can be read back
  localparam int unsigned WR_WIDTH_OUTPUT  = 1;
  localparam int unsigned DOUT_WR          = 0;  // bit k = digital output k
  localparam int unsigned DOUT_BIT         = 0;

  // R_RI: read-only inputs (0 and 1 hold 0xDEAD and 0xBEEF)
  localparam int unsigned WIDTH_INPUT      = 7;
  localparam int unsigned DIN_RI           = 2;  // bit k = digital input k
  localparam int unsigned SPI0_RX_RI       = 3;
  localparam int unsigned SPI0_STAT_RI     = 4;  // [0] busy
  localparam int unsigned CUSTOM0_RI[2]    = '{5, 6};

  // RW_RI: inputs written by a peripheral and by software
  localparam int unsigned WIDTH_INPUT_W    = 1;
  localparam int unsigned UART0_RWRI       = 0;  // [8] new byte, [7:0] byte

  // Memories
  localparam int unsigned MEM_NUMBER       = 1;
  localparam int unsigned MEM_SIZE  [8]    = '{512, 64, 64, 64, 64, 64, 64, 64};
  localparam int unsigned MEM_WIDTH [8]    = '{8, 16, 16, 16, 16, 16, 16, 16};
  localparam int unsigned CUSTOM0_MEM      = 0;

  // Peripheral rates
  localparam int unsigned PWMU0_HZ  = 20_000;
  localparam int unsigned PWMU1_HZ  = 20_000;
  localparam int unsigned PWMH0_HZ  = 20_000;
  localparam int unsigned UART0_BAUD = 115_200;
  localparam int unsigned SPI0_BITS  = 16;
  localparam int unsigned SPI0_SCLK_HZ = 1_000_000;

endpackage
