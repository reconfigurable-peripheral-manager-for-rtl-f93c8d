// tb_r_ri: reads every index of the input words: 0xDEAD, 0xBEEF, then the
// peripheral words, and 0 past the end.
`timescale 1ns/1ps
module tb_r_ri;
  import logibot_pkg::*;
  `include "tb_check.svh"
  localparam int N = 6;
  int checks = 0, failures = 0;
  wb_req_t wb;
  logic [N*16-1:0] ri;
  logic [15:0] rd, exp_rd;

  r_ri #(.WIDTH_INPUT(N)) dut (.wb(wb), .ri(ri), .rddata(rd));

  initial begin
    #1000000; failures++; $display("FAIL: watchdog"); `TB_REPORT
  end

  initial begin
    wb = '0;
    for (int t = 0; t < 300; t++) begin
      for (int i = 0; i < N; i++) ri[i*16 +: 16] = 16'($urandom);
      wb.addr   = {3'b010, 13'($urandom % (N + 4))};
      wb.wren   = 1'($urandom);
      wb.wrdata = 16'($urandom);
      #1;
      case (32'(wb.addr[12:0]))
        0: exp_rd = 16'hDEAD;
        1: exp_rd = 16'hBEEF;
        default: exp_rd = (wb.addr[12:0] < N) ? ri[wb.addr[12:0]*16 +: 16] : 16'h0000;
      endcase
      `CHECK_EQ(rd, exp_rd, "read word")
    end
    `TB_REPORT
  end
endmodule
