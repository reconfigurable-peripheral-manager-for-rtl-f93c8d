// tb_gpmc_sync: checks that a value captured on the falling edge of the
// GPMC clock reaches q after exactly two FPGA clock edges, not earlier, and
// that input changes while the GPMC clock is stopped do not pass.
`timescale 1ns/1ps
module tb_gpmc_sync;
  `include "tb_check.svh"
  int checks = 0, failures = 0;
  logic gclk = 0, fclk = 0, reset = 0;
  initial #1 reset = 1;
  logic [7:0] d = 8'h00, q;

  gpmc_sync #(.W(8), .RST_VAL(8'h00)) dut (.gpmc_clk(gclk), .fpga_clk(fclk), .reset(reset), .d(d), .q(q));

  always #5 fclk = ~fclk;           // 100 MHz

  initial begin
    #100000; failures++; $display("FAIL: watchdog"); `TB_REPORT
  end

  initial begin
    logic [7:0] v, prev;
    prev = 8'h00;
    #22 reset = 0;
    for (int i = 0; i < 40; i++) begin
      v = 8'($urandom) | 8'h01;
      if (v == prev) v = ~v;
      @(posedge fclk); #2;
      d = v; gclk = 1;                // rising edge: nothing captured
      @(posedge fclk); #1;
      `CHECK_EQ(q, prev, "rising GPMC edge must not capture")
      #1 gclk = 0;                    // falling edge: capture
      @(posedge fclk); #1;
      `CHECK_EQ(q, prev, "not through after one FPGA edge")
      @(posedge fclk); #1;
      `CHECK_EQ(q, v, "through after two FPGA edges")
      d = ~v;
      repeat (3) @(posedge fclk); #1;
      `CHECK_EQ(q, v, "holds while the GPMC clock is stopped")
      prev = v;
    end
    `TB_REPORT
  end
endmodule
