// tb_wb_decoder: sweeps addresses over the five regions and checks each
// select line and the read multiplexer against the address map
// 0x0000 W_RO, 0x2000 WR_RO, 0x4000 R_RI, 0x6000 RW_RI, 0x8000.. memory.
`timescale 1ns/1ps
module tb_wb_decoder;
  import logibot_pkg::*;
  `include "tb_check.svh"
  int checks = 0, failures = 0;
  wb_req_t wb;
  logic s0, s1, s2, s3, sm;
  logic [15:0] rddata;
  localparam logic [15:0] D_WR = 16'h1111, D_R = 16'h2222, D_RW = 16'h3333, D_M = 16'h4444;

  wb_decoder dut (.wb(wb), .sel_w_ro(s0), .sel_wr_ro(s1), .sel_r_ri(s2), .sel_rw_ri(s3),
                  .sel_mem(sm), .rd_wr_ro(D_WR), .rd_r_ri(D_R), .rd_rw_ri(D_RW),
                  .rd_mem(D_M), .rddata(rddata));

  initial begin
    #1000000; failures++; $display("FAIL: watchdog"); `TB_REPORT
  end

  initial begin
    logic [15:0] exp_rd;
    logic [4:0]  exp_sel;
    wb = '0;
    for (int i = 0; i < 2000; i++) begin
      wb.addr   = (i < 64) ? 16'(i * 1024) : 16'($urandom);
      wb.wrdata = 16'($urandom);
      wb.wren   = 1'($urandom);
      #1;
      if (wb.addr < 16'h2000)      begin exp_sel = 5'b00001; exp_rd = 16'h0000; end
      else if (wb.addr < 16'h4000) begin exp_sel = 5'b00010; exp_rd = D_WR; end
      else if (wb.addr < 16'h6000) begin exp_sel = 5'b00100; exp_rd = D_R; end
      else if (wb.addr < 16'h8000) begin exp_sel = 5'b01000; exp_rd = D_RW; end
      else                         begin exp_sel = 5'b10000; exp_rd = D_M; end
      `CHECK_EQ({sm, s3, s2, s1, s0}, exp_sel, "selects")
      `CHECK_EQ(rddata, exp_rd, "read mux")
    end
    `TB_REPORT
  end
endmodule
