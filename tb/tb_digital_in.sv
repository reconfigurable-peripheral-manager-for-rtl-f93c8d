// tb_digital_in: pins reach the word after two clocks, in their bit
// positions, with the unused bits 0.
`timescale 1ns/1ps
module tb_digital_in;
  `include "tb_check.svh"
  int checks = 0, failures = 0;
  logic clk = 0, reset = 0;
  logic [4:0] pins, p1, p2;
  logic [15:0] word;
  always #5 clk = ~clk;
  initial #1 reset = 1;

  digital_in #(.N(5)) dut (.clock(clk), .reset(reset), .pins(pins), .word(word));

  initial begin
    #100000; failures++; $display("FAIL: watchdog"); `TB_REPORT
  end
  initial begin
    pins = '0; p1 = '0; p2 = '0;
    #12 reset = 0;
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      `CHECK_EQ(word, {11'b0, p1}, "two-clock delayed pins")
      p2 = p1; p1 = pins;
      pins = 5'($urandom);
    end
    `TB_REPORT
  end
endmodule
