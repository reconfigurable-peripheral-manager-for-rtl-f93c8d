// tb_dpram: random reads and writes on both ports against a model; read
// data appears one clock after the address (read-before-write).
`timescale 1ns/1ps
module tb_dpram;
  `include "tb_check.svh"
  localparam int W = 12, D = 40;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic a_en, a_we, b_en, b_we;
  logic [5:0] a_addr, b_addr;
  logic [W-1:0] a_din, b_din, a_dout, b_dout, exp_a, exp_b;
  logic [W-1:0] model [D];

  always #5 clk = ~clk;

  dpram #(.WIDTH(W), .DEPTH(D)) dut (.clock(clk), .a_en(a_en), .a_we(a_we), .a_addr(a_addr),
    .a_din(a_din), .a_dout(a_dout), .b_en(b_en), .b_we(b_we), .b_addr(b_addr),
    .b_din(b_din), .b_dout(b_dout));

  initial begin
    #1000000; failures++; $display("FAIL: watchdog"); `TB_REPORT
  end

  initial begin
    a_en = 1; a_we = 1; b_en = 0; b_we = 0; a_addr = 0; b_addr = 0; a_din = 0; b_din = 0;
    for (int i = 0; i < D; i++) begin
      @(negedge clk); a_addr = 6'(i); a_din = W'(i * 7); model[i] = W'(i * 7);
    end
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      a_en = 1'($urandom); a_we = 1'($urandom); a_addr = 6'($urandom % D); a_din = W'($urandom);
      b_en = 1'($urandom); b_we = 1'($urandom); b_addr = 6'($urandom % D); b_din = W'($urandom);
      if (a_en && a_we && b_en && b_we && a_addr == b_addr) a_we = 0;
      exp_a = model[a_addr]; exp_b = model[b_addr];
      @(posedge clk); #1;
      if (a_en) `CHECK_EQ(a_dout, exp_a, "port A read")
      if (b_en) `CHECK_EQ(b_dout, exp_b, "port B read")
      if (a_en && a_we) model[a_addr] = a_din;
      if (b_en && b_we) model[b_addr] = b_din;
    end
    `TB_REPORT
  end
endmodule
