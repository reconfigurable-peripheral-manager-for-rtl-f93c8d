// wr_ro: bank of output registers that the Wishbone can also read (WR_RO).
//
// Same as W_RO, plus a read path: rddata is register addr[12:0], or 0 past
// the end of the bank. It is used where software needs read-modify-write,
// e.g. digital outputs where one register carries up to 16 output bits.
// Write latency one clock; the read is combinational.
module wr_ro
  import logibot_pkg::*;
#(
  parameter int unsigned WR_WIDTH_OUTPUT = 1
) (
  input  logic                            clock,
  input  logic                            reset,
  input  wb_req_t                         wb,
  input  logic                            sel,
  output logic [WR_WIDTH_OUTPUT*16-1:0]   r_o,
  output logic [15:0]                     rddata
);
  localparam int unsigned IW = (WR_WIDTH_OUTPUT > 1) ? $clog2(WR_WIDTH_OUTPUT) : 1;

  logic [15:0]   ro [WR_WIDTH_OUTPUT];
  logic [IW-1:0] idx;
  logic          in_range;

  assign idx      = IW'(wb.addr[12:0]);

  assign in_range = 32'(wb.addr[12:0]) < WR_WIDTH_OUTPUT;

  always_ff @(posedge clock or posedge reset)
    if (reset) begin
      for (int i = 0; i < WR_WIDTH_OUTPUT; i++) ro[i] <= '0;
    end else if (sel && wb.wren && in_range) begin
      ro[idx] <= wb.wrdata;
    end

  assign rddata = in_range ? ro[idx] : '0;

  for (genvar g = 0; g < WR_WIDTH_OUTPUT; g++) begin : g_flatten
    assign r_o[g*16 +: 16] = ro[g];
  end
endmodule
