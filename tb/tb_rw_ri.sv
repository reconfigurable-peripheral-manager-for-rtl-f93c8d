// tb_rw_ri: peripheral loads on enable, host writes, both at once (the
// peripheral wins), and reads, against a model; a register without enable
// or write keeps its value.
`timescale 1ns/1ps
module tb_rw_ri;
  import logibot_pkg::*;
  `include "tb_check.svh"
  localparam int N = 3;
  int checks = 0, failures = 0;
  logic clk = 0, reset = 0, sel;
  wb_req_t wb;
  logic [N*16-1:0] ri;
  logic [N-1:0] en;
  logic [15:0] rd;
  logic [15:0] model [N];
  int both = 0;

  always #5 clk = ~clk;
  initial #1 reset = 1;

  rw_ri #(.WIDTH_INPUT_W(N)) dut (.clock(clk), .reset(reset), .wb(wb), .sel(sel),
                                  .ri(ri), .en(en), .rddata(rd));

  initial begin
    #1000000; failures++; $display("FAIL: watchdog"); `TB_REPORT
  end

  initial begin
    wb = '0; sel = 0; en = '0; ri = '0;
    for (int i = 0; i < N; i++) model[i] = '0;
    #12 reset = 0;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      wb.addr   = {3'b011, 13'($urandom % (N + 1))};
      wb.wrdata = 16'($urandom);
      wb.wren   = ($urandom % 3) == 0;
      sel       = 1'b1;
      for (int i = 0; i < N; i++) ri[i*16 +: 16] = 16'($urandom);
      en        = N'($urandom) & N'($urandom);
      #1;
      `CHECK_EQ(rd, (wb.addr[12:0] < N) ? model[wb.addr[12:0]] : 16'h0000, "read")
      @(posedge clk); #1;
      for (int i = 0; i < N; i++) begin
        if (en[i]) model[i] = ri[i*16 +: 16];
        else if (wb.wren && wb.addr[12:0] == 13'(i)) model[i] = wb.wrdata;
        if (en[i] && wb.wren && wb.addr[12:0] == 13'(i)) both++;
      end
      for (int i = 0; i < N; i++) `CHECK_EQ(dut.rg[i], model[i], "register")
    end
    `CHECK(both > 0, "peripheral and host wrote the same register together")
    `TB_REPORT
  end
endmodule
