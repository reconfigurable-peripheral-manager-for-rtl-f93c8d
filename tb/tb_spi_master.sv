// tb_spi_master: 16-bit and 8-bit masters exchange words with testbench
// slaves (mode 0, MSB first). Checks the word each slave received, the
// word each master received, the number of clock pulses, the SCLK period
// (100 clocks for 1 MHz at 100 MHz) and that busy covers the transfer.
`timescale 1ns/1ps
module tb_spi_master;
  `include "tb_check.svh"
  int checks = 0, failures = 0;
  logic clk = 0, reset = 0;
  logic [15:0] tx [2], ctrl [2], rx [2];
  logic [1:0] busy, done, sclk, sdo, sdi, cs_n;
  logic [15:0] slave_out [2], slave_in [2];
  int pulses [2];
  realtime last_rise [2], period [2];
  always #5 clk = ~clk;
  initial #1 reset = 1;

  localparam int NB [2] = '{16, 8};
  for (genvar i = 0; i < 2; i++) begin : g_dut
    spi_master #(.CLK_HZ(100_000_000), .SCLK_HZ(1_000_000), .N_BITS(NB[i])) u (
      .clock(clk), .reset(reset), .tx_reg(tx[i]), .ctrl_reg(ctrl[i]), .rx_data(rx[i]),
      .busy(busy[i]), .done(done[i]), .sclk(sclk[i]), .sdo(sdo[i]), .sdi(sdi[i]), .cs_n(cs_n[i]));

    // mode-0 slave: first bit ready when CS falls, sample on rise, shift on fall
    logic [15:0] sh;
    always @(negedge cs_n[i]) begin sh = slave_out[i] << (16 - NB[i]); sdi[i] = sh[15]; pulses[i] = 0; end
    always @(posedge sclk[i]) if (!cs_n[i]) begin
      slave_in[i] = {slave_in[i][14:0], sdo[i]};
      pulses[i]++;
      if (pulses[i] > 1) period[i] = $realtime - last_rise[i];
      last_rise[i] = $realtime;
    end
    always @(negedge sclk[i]) if (!cs_n[i]) begin sh = sh << 1; sdi[i] = sh[15]; end
  end

  initial begin
    #10000000; failures++; $display("FAIL: watchdog"); `TB_REPORT
  end

  initial begin
    logic [15:0] m, s;
    logic [15:0] mask;
    tx = '{0, 0}; ctrl = '{0, 0}; sdi = '0; slave_out = '{0, 0}; slave_in = '{0, 0};
    #12 reset = 0;
    #100;
    `CHECK_EQ(cs_n, 2'b11, "CS idles high")
    for (int k = 0; k < 12; k++) begin
      for (int i = 0; i < 2; i++) begin
        m = 16'($urandom); s = 16'($urandom);
        mask = (NB[i] == 16) ? 16'hFFFF : 16'h00FF;
        tx[i] = m; slave_out[i] = s & mask;
        @(negedge clk); ctrl[i][0] = ~ctrl[i][0];
        @(negedge clk);
        `CHECK(busy[i], "busy after the start toggle")
        wait (done[i]);
        @(negedge clk);
        `CHECK_EQ(slave_in[i] & mask, m & mask, $sformatf("%0d-bit slave received", NB[i]))
        `CHECK_EQ(rx[i], s & mask, $sformatf("%0d-bit master received", NB[i]))
        `CHECK_EQ(pulses[i], NB[i], "clock pulses")
        `CHECK(period[i] == 1000.0, $sformatf("SCLK period %0t", period[i]))
        `CHECK(!busy[i] && cs_n[i], "idle after the transfer")
      end
    end
    `TB_REPORT
  end
endmodule
