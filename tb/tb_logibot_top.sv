// tb_logibot_top: end-to-end test of the peripheral manager at its default
// configuration and 100 MHz, driven only through GPMC accesses from a host
// model, as software would. It covers the link test words, every register
// region, the memory from both sides, and each peripheral at its port:
// PWM duty at 20 kHz on two unidirectional outputs, the H-bridge direction,
// a UART byte looped from its TX port to its RX port and taken from RW_RI
// (then cleared by software), an SPI exchange with a slave model, a servo
// pulse of 1.5 ms in a 20 ms frame, digital in and out, and the custom
// block connections. Each mechanism is counted and must have happened.
`timescale 1ns/1ps
module tb_logibot_top;
  `include "tb_check.svh"
  int checks = 0, failures = 0;
  logic clk = 0, reset = 0;
  always #5 clk = ~clk;
  initial #1 reset = 1;

  // GPMC
  logic gclk, advn, csn, oen, wen, drv_en, ad_oe;
  logic [1:0] ben;
  logic [15:0] ad_drv, ad_o, ad_i;
  // ports
  logic [21:0] pad_i, pad_o, pad_oe, pad;
  // custom blocks
  logic [1:0][15:0] cr_ro, cr_ri;
  logic [1:0] cr_pout;
  logic cr_pin, cm_en, cm_we, cm_pout, cm_pin;
  logic [14:0] cm_addr;
  logic [15:0] cm_din, cm_dout;

  gpmc_host #(.PERIOD_NS(40)) host (
    .gpmc_clk(gclk), .ad_drv(ad_drv), .ad_drv_en(drv_en), .ad_from_fpga(ad_o),
    .ad_fpga_oe(ad_oe), .advn(advn), .csn(csn), .oen(oen), .wen(wen), .ben(ben));
  assign ad_i = drv_en ? ad_drv : (ad_oe ? ad_o : 16'h0000);

  logibot_top dut (
    .clock100M(clk), .reset(reset),
    .gpmc_clk(gclk), .gpmc_ad_i(ad_i), .gpmc_ad_o(ad_o), .gpmc_ad_oe(ad_oe),
    .gpmc_advn(advn), .gpmc_csn(csn), .gpmc_oen(oen), .gpmc_wen(wen), .gpmc_ben(ben),
    .pad_i(pad_i), .pad_o(pad_o), .pad_oe(pad_oe),
    .custom_r_ro(cr_ro), .custom_r_ri(cr_ri), .custom_r_port_out(cr_pout), .custom_r_port_in(cr_pin),
    .custom_m_en(cm_en), .custom_m_we(cm_we), .custom_m_addr(cm_addr), .custom_m_din(cm_din),
    .custom_m_dout(cm_dout), .custom_m_port_out(cm_pout), .custom_m_port_in(cm_pin));

  // Board: what each pin carries. Outputs come from the FPGA; inputs from
  // the testbench, with the UART looped back from TX (PMOD1_2) to RX (PMOD2_6)
  // and an SPI slave on PMOD1_0/PMOD1_1/ARD_4/PMOD2_0.
  logic din_level = 0, spi_sdi = 0, cr_in_level = 0, cm_in_level = 0;
  always_comb begin
    pad_i = '0;
    pad_i[13] = din_level;          // DIGITAL_IN  PMOD2_5
    pad_i[14] = pad_o[2];           // UART RX  <- UART TX
    pad_i[18] = cr_in_level;        // custom_r input  ARD_2
    pad_i[19] = cm_in_level;        // custom_m input  ARD_3
    pad_i[20] = spi_sdi;            // SPI SDI  ARD_4
  end
  assign pad = (pad_o & pad_oe) | (pad_i & ~pad_oe);

  // SPI slave (mode 0, 16 bits)
  logic [15:0] sl_out = 16'hC3A5, sl_in = 0, sl_sh;
  int spi_pulses = 0;
  always @(negedge pad[8]) begin sl_sh = sl_out; spi_sdi = sl_sh[15]; end
  always @(posedge pad[0]) if (!pad[8]) begin sl_in = {sl_in[14:0], pad[1]}; spi_pulses++; end
  always @(negedge pad[0]) if (!pad[8]) begin sl_sh = sl_sh << 1; spi_sdi = sl_sh[15]; end

  // Mechanism counters
  int n_wren = 0, n_rwri_periph = 0, n_rwri_host = 0, n_uart_rx = 0, n_spi_done = 0, n_oe = 0;
  always @(posedge clk) begin
    if (dut.wb.wren) n_wren++;
    if (dut.rw_ri_en[0]) n_rwri_periph++;
    if (dut.wb.wren && dut.sel_rw_ri) n_rwri_host++;
    if (dut.u_uart0.rx_ready) n_uart_rx++;
    if (dut.spi_done) n_spi_done++;
    if (ad_oe && !$past(ad_oe)) n_oe++;
    if (ad_oe && drv_en) begin failures++; $display("FAIL: AD contention at %0t", $time); end
  end

  task automatic rd(input logic [15:0] a, output logic [15:0] d); host.read16(a, d); endtask
  task automatic wr(input logic [15:0] a, input logic [15:0] d); host.write16(a, d); endtask

  // High clocks of one pad over a window of n clocks.
  task automatic duty(input int p, input int n, output int high);
    high = 0;
    repeat (n) begin @(posedge clk); #1; if (pad[p]) high++; end
  endtask

  initial begin
    #100000000; failures++; $display("FAIL: watchdog"); `TB_REPORT
  end

  initial begin
    logic [15:0] d;
    int h, h2, h3, h4, t0, t1;
    cr_ri = '{16'h1234, 16'hABCD}; cr_pout = 2'b10; cm_en = 0; cm_we = 0; cm_addr = 0;
    cm_din = 0; cm_pout = 1;
    #23 reset = 0;
    #200;

    // link test words
    rd(16'h4000, d); `CHECK_EQ(d, 16'hDEAD, "R_RI word 0")
    rd(16'h4001, d); `CHECK_EQ(d, 16'hBEEF, "R_RI word 1")

    // digital in / out
    din_level = 1; #100;
    rd(16'h4002, d); `CHECK_EQ(d, 16'h0001, "digital input high")
    din_level = 0; #100;
    rd(16'h4002, d); `CHECK_EQ(d, 16'h0000, "digital input low")
    wr(16'h2000, 16'h0001); #100;
    `CHECK_EQ({pad_oe[3], pad[3]}, 2'b11, "digital output PMOD1_3 high")
    rd(16'h2000, d); `CHECK_EQ(d, 16'h0001, "WR_RO read back")
    wr(16'h2000, 16'h0000); #100;
    `CHECK_EQ(pad[3], 1'b0, "digital output low")

    // W_RO is write-only
    wr(16'h0007, 16'h5151); wr(16'h0008, 16'h6262); #100;
    `CHECK_EQ(cr_ro[0], 16'h5151, "custom_r register 0")
    `CHECK_EQ(cr_ro[1], 16'h6262, "custom_r register 1")
    rd(16'h0007, d); `CHECK_EQ(d, 16'h0000, "W_RO reads 0")
    rd(16'h4005, d); `CHECK_EQ(d, 16'hABCD, "custom_r input word 0")
    rd(16'h4006, d); `CHECK_EQ(d, 16'h1234, "custom_r input word 1")
    `CHECK_EQ({pad[7], pad[5]}, 2'b10, "custom_r output ports")
    cr_in_level = 1; #10; `CHECK_EQ(cr_pin, 1'b1, "custom_r input port")
    `CHECK_EQ(pad[6], 1'b1, "custom_m output port")
    cm_in_level = 1; #10; `CHECK_EQ(cm_pin, 1'b1, "custom_m input port")

    // memory: host writes, custom block reads; custom block writes, host reads
    for (int k = 0; k < 8; k++) wr(16'(16'h8000 + k * 37), 16'(16'h0100 + k * 11));
    for (int k = 0; k < 8; k++) begin
      @(negedge clk); cm_en = 1; cm_addr = 15'(k * 37);
      @(negedge clk); cm_en = 0;
      `CHECK_EQ(cm_dout, 16'((k * 11) & 8'hFF), "memory port B reads the host's byte")
    end
    @(negedge clk); cm_en = 1; cm_we = 1; cm_addr = 15'd511; cm_din = 16'h77E1;
    @(negedge clk); cm_en = 0; cm_we = 0;
    rd(16'h81FF, d); `CHECK_EQ(d, 16'h00E1, "host reads the custom block's byte")
    for (int k = 0; k < 8; k++) begin
      rd(16'(16'h8000 + k * 37), d); `CHECK_EQ(d, 16'((16'h0100 + k * 11) & 16'h00FF), "memory read back")
    end

    // PWM unidirectional: 50 % on ARD_0, 25 % (negative) on ARD_1
    wr(16'h0000, 16'h1000 | 16'd50);
    wr(16'h0001, 16'h1000 | 16'(8'(-25)));
    #(2 * 50000 + 100);
    fork
      duty(16, 10000, h);
      duty(17, 10000, h2);
    join
    `CHECK_EQ(h, 5000, "PWMU0 50 % over two periods")
    `CHECK_EQ(h2, 2500, "PWMU1 25 % over two periods")
    `CHECK_EQ(pad_oe[16] & pad_oe[17], 1'b1, "PWM ports are outputs")

    // H-bridge: -40 drives S2 (PMOD2_3) and S3 (PMOD2_4)
    wr(16'h0002, 16'h1000 | 16'(8'(-40)));
    #(2 * 50000 + 100);
    fork
      duty(10, 10000, h);
      duty(11, 10000, h2);
      duty(12, 10000, h3);
      duty(15, 10000, h4);
    join
    `CHECK_EQ(h2, 4000, "H-bridge S2 40 %")
    `CHECK_EQ(h3, 4000, "H-bridge S3 40 %")
    `CHECK_EQ(h + h4, 0, "H-bridge S1 and S4 off in reverse")
    wr(16'h0002, 16'h1000 | 16'd40);
    #(2 * 50000 + 100);
    fork
      duty(10, 10000, h);
      duty(15, 10000, h4);
      duty(11, 10000, h2);
    join
    `CHECK_EQ(h, 4000, "H-bridge S1 40 % forward")
    `CHECK_EQ(h4, 4000, "H-bridge S4 40 % forward")
    `CHECK_EQ(h2, 0, "H-bridge S2 off forward")

    // UART: send 0x4B, looped back, lands in RW_RI with the new-byte flag
    rd(16'h6000, d); `CHECK_EQ(d, 16'h0000, "RW_RI empty")
    wr(16'h0003, 16'h0100 | 16'h4B);
    #(11 * 8680 + 1000);
    rd(16'h6000, d); `CHECK_EQ(d, 16'h014B, "UART byte received with flag")
    wr(16'h6000, 16'h0000);
    rd(16'h6000, d); `CHECK_EQ(d, 16'h0000, "RW_RI cleared by the host")
    wr(16'h0003, 16'h0000 | 16'h4B);                   // same byte again
    #(11 * 8680 + 1000);
    rd(16'h6000, d); `CHECK_EQ(d, 16'h014B, "repeated byte seen as new")

    // SPI: 16-bit exchange
    wr(16'h0004, 16'h9A3C);
    wr(16'h0005, 16'h0001);
    rd(16'h4004, d); `CHECK_EQ(d, 16'h0001, "SPI busy")
    #20000;
    rd(16'h4004, d); `CHECK_EQ(d, 16'h0000, "SPI done")
    rd(16'h4003, d); `CHECK_EQ(d, 16'hC3A5, "SPI word from the slave")
    `CHECK_EQ(sl_in, 16'h9A3C, "SPI word to the slave")
    `CHECK_EQ(spi_pulses, 16, "SPI clock pulses")

    // servo: 1500 us pulse in a 20 ms frame on ARD_5
    wr(16'h0006, 16'd1500);
    @(posedge pad[21]);                 // may be a frame with the old width
    @(posedge pad[21]); t0 = $time;
    @(negedge pad[21]); t1 = $time;
    `CHECK_EQ((t1 - t0) / 10, 150000, "servo pulse 1.5 ms")
    @(posedge pad[21]);
    `CHECK_EQ(($time - t0) / 10, 2000000, "servo frame 20 ms")

    // every mechanism happened
    `CHECK(host.n_writes > 0 && n_wren == host.n_writes, $sformatf("one strobe per GPMC write (%0d/%0d)", n_wren, host.n_writes))
    `CHECK(host.n_reads > 0 && n_oe == host.n_reads, $sformatf("FPGA drove AD once per read (%0d/%0d)", n_oe, host.n_reads))
    `CHECK(n_rwri_periph == 2, $sformatf("RW_RI loaded by the peripheral (%0d)", n_rwri_periph))
    `CHECK(n_rwri_host == 1, $sformatf("RW_RI written by the host (%0d)", n_rwri_host))
    `CHECK(n_uart_rx == 2, "UART receptions")
    `CHECK(n_spi_done == 1, "SPI transfers")
    $display("mechanisms: gpmc writes %0d, reads %0d, RW_RI peripheral loads %0d, host writes %0d, UART rx %0d, SPI %0d",
             host.n_writes, host.n_reads, n_rwri_periph, n_rwri_host, n_uart_rx, n_spi_done);
    `TB_REPORT
  end
endmodule
