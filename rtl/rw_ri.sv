// rw_ri: input registers written by both a peripheral and the Wishbone
// (RW_RI).
//
// Each register loads when its peripheral raises its enable bit, taking the
// peripheral's word, or when the Wishbone writes its address, taking the
// write data. The two load requests are ORed; the peripheral's enable also
// steers the input multiplexer, so it wins if both happen in one clock.
// A peripheral such as a UART strobes enable for one clock when it has new
// data; software reads the register and then writes a default value back,
// so a later read tells a new word from an old one even if they are equal.
// Interface: ri / en from peripherals (word k at ri[16k +: 16], enable en[k]),
// rddata to the Wishbone (combinational, 0 past the end). Registers clear
// to 0 on reset; a load takes one clock.
module rw_ri
  import logibot_pkg::*;
#(
  parameter int unsigned WIDTH_INPUT_W = 1
) (
  input  logic                          clock,
  input  logic                          reset,
  input  wb_req_t                       wb,
  input  logic                          sel,
  input  logic [WIDTH_INPUT_W*16-1:0]   ri,
  input  logic [WIDTH_INPUT_W-1:0]      en,
  output logic [15:0]                   rddata
);
  localparam int unsigned IW = (WIDTH_INPUT_W > 1) ? $clog2(WIDTH_INPUT_W) : 1;

  logic [15:0]   rg [WIDTH_INPUT_W];
  logic [IW-1:0] idx;
  logic          in_range;

  assign idx      = IW'(wb.addr[12:0]);

  assign in_range = 32'(wb.addr[12:0]) < WIDTH_INPUT_W;

  for (genvar g = 0; g < WIDTH_INPUT_W; g++) begin : g_reg
    logic wb_hit;
    assign wb_hit = sel && wb.wren && (32'(wb.addr[12:0]) == g);
    always_ff @(posedge clock or posedge reset)
      if (reset)                rg[g] <= '0;
      else if (wb_hit || en[g]) rg[g] <= en[g] ? ri[g*16 +: 16] : wb.wrdata;
  end

  assign rddata = in_range ? rg[idx] : '0;
endmodule
