// wb_decoder: address decoder and read-data multiplexer of the Wishbone.
//
// Every block sits in a fixed region of the 64K-word space whatever its
// size, so a block is selected by comparing only the three most significant
// address bits: 000 W_RO, 001 WR_RO, 010 R_RI, 011 RW_RI, 1xx memories.
// The index inside a register region is addr[12:0] (up to 8K registers).
// sel_* go to the blocks and qualify their writes; rddata returns the word
// of the selected readable block, combinationally. W_RO cannot be read and
// returns 0. Memory read data arrives one clock after its address (the RAM
// read is registered), which the slow GPMC read absorbs.
module wb_decoder
  import logibot_pkg::*;
(
  input  wb_req_t     wb,
  output logic        sel_w_ro,
  output logic        sel_wr_ro,
  output logic        sel_r_ri,
  output logic        sel_rw_ri,
  output logic        sel_mem,
  input  logic [15:0] rd_wr_ro,
  input  logic [15:0] rd_r_ri,
  input  logic [15:0] rd_rw_ri,
  input  logic [15:0] rd_mem,
  output logic [15:0] rddata
);
  logic [2:0] region;
  assign region = wb.addr[15:13];

  always_comb begin
    sel_w_ro  = (region == REG_W_RO);
    sel_wr_ro = (region == REG_WR_RO);
    sel_r_ri  = (region == REG_R_RI);
    sel_rw_ri = (region == REG_RW_RI);
    sel_mem   = wb.addr[15];
    unique casez (region)
      REG_WR_RO: rddata = rd_wr_ro;
      REG_R_RI:  rddata = rd_r_ri;
      REG_RW_RI: rddata = rd_rw_ri;
      3'b1??:    rddata = rd_mem;
      default:   rddata = '0;      // W_RO is write-only
    endcase
  end
endmodule
