// tb_wr_ro: random writes and reads, some with the bank deselected, with wren low or
// past the last register; the flattened output bus must match a model.
`timescale 1ns/1ps
module tb_wr_ro;
  import logibot_pkg::*;
  `include "tb_check.svh"
  localparam int N = 5;
  int checks = 0, failures = 0;
  logic clk = 0, reset = 0, sel;
  wb_req_t wb;
  logic [N*16-1:0] r_o;
  logic [15:0] model [N];
  logic [15:0] rd;

  always #5 clk = ~clk;
  initial #1 reset = 1;

  wr_ro #(.WR_WIDTH_OUTPUT(N)) dut (.clock(clk), .reset(reset), .wb(wb), .sel(sel), .r_o(r_o), .rddata(rd));

  initial begin
    #1000000; failures++; $display("FAIL: watchdog"); `TB_REPORT
  end

  initial begin
    wb = '0; sel = 0;
    for (int i = 0; i < N; i++) model[i] = '0;
    #12 reset = 0;
    @(negedge clk);
    for (int i = 0; i < N; i++) `CHECK_EQ(r_o[i*16 +: 16], 16'h0000, "reset value")
    for (int t = 0; t < 1000; t++) begin
      wb.addr   = {3'b001, 13'($urandom % (N + 3))};
      if (t % 7 == 0) wb.addr[15:13] = 3'b000;
      wb.wrdata = 16'($urandom);
      wb.wren   = ($urandom % 4) != 0;
      sel       = (wb.addr[15:13] == 3'b001);
      @(posedge clk); #1;
      if (sel && wb.wren && wb.addr[12:0] < N) model[wb.addr[12:0]] = wb.wrdata;
      for (int i = 0; i < N; i++) `CHECK_EQ(r_o[i*16 +: 16], model[i], "register value")
      `CHECK_EQ(rd, (wb.addr[12:0] < N) ? model[wb.addr[12:0]] : 16'h0000, "read back")
    end
    `TB_REPORT
  end
endmodule
