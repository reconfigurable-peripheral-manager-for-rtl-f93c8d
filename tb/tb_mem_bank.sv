// tb_mem_bank: eight banks, holding one to eight memories. For each, every
// 4K slot of 32K..64K is written through the Wishbone with a tag and read
// back, and the slot-to-memory map is checked against the allocation table
// (memories 1..8 start at 32K, 48K, 56K, 40K, 36K, 44K, 52K, 60K and each
// runs to the next existing memory). Port B reads what port A wrote and
// port A reads what port B wrote.
`timescale 1ns/1ps
module tb_mem_bank;
  import logibot_pkg::*;
  `include "tb_check.svh"
  int checks = 0, failures = 0;
  logic clk = 0, reset = 0;
  always #5 clk = ~clk;
  initial #1 reset = 1;

  // Owner (1-based memory number) of each slot, for 1..8 memories.
  localparam int OWNER [8][8] = '{
    '{1, 1, 1, 1, 1, 1, 1, 1},
    '{1, 1, 1, 1, 2, 2, 2, 2},
    '{1, 1, 1, 1, 2, 2, 3, 3},
    '{1, 1, 4, 4, 2, 2, 3, 3},
    '{1, 5, 4, 4, 2, 2, 3, 3},
    '{1, 5, 4, 6, 2, 2, 3, 3},
    '{1, 5, 4, 6, 2, 7, 3, 3},
    '{1, 5, 4, 6, 2, 7, 3, 8}};

  wb_req_t wb;
  logic [15:0] rd [8];
  logic [7:0][15:0] bdout [8];
  logic [7:0] ben, bwe;
  logic [7:0][14:0] baddr;
  logic [7:0][15:0] bdin;

  for (genvar n = 1; n <= 8; n++) begin : g_bank
    mem_bank #(.MEM_NUMBER(n), .MEM_SIZE('{64, 64, 64, 64, 64, 64, 64, 64}),
               .MEM_WIDTH('{16, 8, 16, 12, 16, 16, 9, 16})) u (
      .clock(clk), .reset(reset), .wb(wb), .sel(wb.addr[15]), .rddata(rd[n-1]),
      .b_en(ben[n-1:0]), .b_we(bwe[n-1:0]), .b_addr(baddr[n-1:0]), .b_din(bdin[n-1:0]),
      .b_dout(bdout[n-1][n-1:0]));
  end
  localparam int WID [8] = '{16, 8, 16, 12, 16, 16, 9, 16};

  task automatic wb_write(input logic [15:0] a, input logic [15:0] d);
    @(negedge clk); wb.addr = a; wb.wrdata = d; wb.wren = 1;
    @(negedge clk); wb.wren = 0;
  endtask

  initial begin
    #5000000; failures++; $display("FAIL: watchdog"); `TB_REPORT
  end

  initial begin
    int owner;
    logic [15:0] tag, mask;
    wb = '0; ben = '0; bwe = '0; baddr = '0; bdin = '0;
    #12 reset = 0;
    // each slot s, word 5: tag 0x50 + s (8 bits so every width keeps it)
    for (int s = 0; s < 8; s++) wb_write(16'(32768 + s * 4096 + 5), 16'(8'h50 + s));
    for (int n = 1; n <= 8; n++)
      for (int s = 0; s < 8; s++) begin
        // the last write into the owner's region wins: the owner's latest slot <= 7
        int last = s;
        owner = OWNER[n-1][s];
        for (int k = 0; k < 8; k++) if (OWNER[n-1][k] == owner) last = k;
        @(negedge clk); wb.addr = 16'(32768 + s * 4096 + 5);
        @(negedge clk);
        `CHECK_EQ(rd[n-1], 16'(8'h50 + last), $sformatf("bank of %0d: slot %0d", n, s))
      end
    // port B of memory m in the 8-memory bank reads the tag of its slot
    for (int m = 0; m < 8; m++) begin
      @(negedge clk); ben = 8'(1 << m); baddr[m] = 15'd5;
      @(negedge clk); ben = '0;
      `CHECK_EQ(bdout[7][m], 16'(8'h50 + mem_slot_start(m)), $sformatf("port B of memory %0d", m + 1))
    end
    // port B writes, port A reads (width truncation)
    for (int m = 0; m < 8; m++) begin
      @(negedge clk); ben = 8'(1 << m); bwe = 8'(1 << m); baddr[m] = 15'd9; bdin[m] = 16'hA5C3 ^ 16'(m);
      @(negedge clk); ben = '0; bwe = '0;
      wb.addr = 16'(32768 + mem_slot_start(m) * 4096 + 9);
      @(negedge clk); @(negedge clk);
      mask = 16'((1 << WID[m]) - 1);
      `CHECK_EQ(rd[7], (16'hA5C3 ^ 16'(m)) & mask, $sformatf("port A reads port B's word, memory %0d", m + 1))
    end
    `TB_REPORT
  end
endmodule
