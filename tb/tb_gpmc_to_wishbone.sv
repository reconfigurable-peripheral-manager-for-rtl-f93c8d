// tb_gpmc_to_wishbone: GPMC writes and reads through the bridge to a
// simple Wishbone register file held in the testbench.
// Checks: one write strobe per GPMC write, with the right address and data;
// the written word lands in the slave; reads return the slave's word inside
// the six-clock GPMC read; the bridge never drives AD outside a read; the
// write strobe comes within 300 ns of the start of the three-clock write.
`timescale 1ns/1ps
module tb_gpmc_to_wishbone;
  import logibot_pkg::*;
  `include "tb_check.svh"
  int checks = 0, failures = 0;
  logic fclk = 0, reset = 0;
  initial #1 reset = 1;
  logic gclk, advn, csn, oen, wen, drv_en, ad_oe;
  logic [1:0] ben;
  logic [15:0] ad_drv, ad_o, ad_i;
  wb_req_t wb;
  logic [15:0] rd;
  logic [15:0] slave [256];
  int wren_count = 0;
  logic [15:0] last_addr, last_data;
  realtime t_start, t_wren;

  always #5 fclk = ~fclk;

  gpmc_host #(.PERIOD_NS(40)) host (
    .gpmc_clk(gclk), .ad_drv(ad_drv), .ad_drv_en(drv_en), .ad_from_fpga(ad_o),
    .ad_fpga_oe(ad_oe), .advn(advn), .csn(csn), .oen(oen), .wen(wen), .ben(ben));

  // AD bus: host drives when enabled, otherwise the FPGA
  assign ad_i = drv_en ? ad_drv : (ad_oe ? ad_o : 16'h0000);

  gpmc_to_wishbone dut (
    .fpga_clk(fclk), .reset(reset), .gpmc_clk(gclk), .gpmc_ad_i(ad_i),
    .gpmc_ad_o(ad_o), .gpmc_ad_oe(ad_oe), .gpmc_advn(advn), .gpmc_csn(csn),
    .gpmc_oen(oen), .gpmc_wen(wen), .gpmc_ben(ben), .wb(wb), .wb_rddata(rd));

  // slave: 256 words, combinational read
  assign rd = slave[wb.addr[7:0]];
  always_ff @(posedge fclk)
    if (wb.wren) begin
      slave[wb.addr[7:0]] <= wb.wrdata;
      wren_count++;
      last_addr <= wb.addr;
      last_data <= wb.wrdata;
      t_wren = $realtime;
    end

  always @(posedge fclk)
    if (ad_oe && drv_en) begin
      failures++; $display("FAIL: bus contention at %0t", $time);
    end

  initial begin
    #2000000; failures++; $display("FAIL: watchdog"); `TB_REPORT
  end

  initial begin
    logic [15:0] a, v, r;
    logic [15:0] model [256];
    int n;
    for (int i = 0; i < 256; i++) begin slave[i] = 16'(i * 3 + 1); model[i] = 16'(i * 3 + 1); end
    #33 reset = 0;
    #100;
    // the figure's example: write 0x80aa to 0x000c, read back
    n = wren_count;
    t_start = $realtime;
    host.write16(16'h000c, 16'h80aa);
    #200;
    `CHECK_EQ(wren_count, n + 1, "exactly one strobe per write")
    `CHECK_EQ(last_addr, 16'h000c, "write address")
    `CHECK_EQ(last_data, 16'h80aa, "write data")
    `CHECK(t_wren - t_start < 300.0, "strobe within 300 ns of the write start")
    model[8'h0c] = 16'h80aa;
    host.read16(16'h000c, r);
    `CHECK_EQ(r, 16'h80aa, "read back the written word")
    // random mix
    for (int i = 0; i < 200; i++) begin
      a = {8'($urandom), 8'($urandom)};
      if (($urandom % 2) == 1) begin
        v = 16'($urandom);
        n = wren_count;
        host.write16(a, v);
        #100;
        model[a[7:0]] = v;
        `CHECK_EQ(wren_count, n + 1, "one strobe")
        `CHECK_EQ(last_addr, a, "address")
        `CHECK_EQ(last_data, v, "data")
      end else begin
        n = wren_count;
        host.read16(a, r);
        `CHECK_EQ(r, model[a[7:0]], "read data")
        `CHECK_EQ(wren_count, n, "no strobe on a read")
        `CHECK_EQ(wb.addr, a, "address held after the read")
      end
      #(int'($urandom % 50));
    end
    `CHECK(!ad_oe, "AD released when idle")
    `TB_REPORT
  end
endmodule
