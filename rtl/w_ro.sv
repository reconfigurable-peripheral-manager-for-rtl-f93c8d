// w_ro: bank of write-only 16-bit output registers (W_RO).
//
// WIDTH_OUTPUT registers are written from the Wishbone and drive
// peripherals. Register k is written when the bank is selected, wb.wren is
// high and addr[12:0] == k; writes to indices past the bank are ignored.
// All registers are exposed flattened on one bus, r_o[16k +: 16] being
// register k, so the number of registers is a single parameter. Registers
// clear to 0 on reset. They cannot be read back, which saves the read
// multiplexer. Write latency: one clock.
module w_ro
  import logibot_pkg::*;
#(
  parameter int unsigned WIDTH_OUTPUT = 2
) (
  input  logic                         clock,
  input  logic                         reset,
  input  wb_req_t                      wb,
  input  logic                         sel,
  output logic [WIDTH_OUTPUT*16-1:0]   r_o
);
  localparam int unsigned IW = (WIDTH_OUTPUT > 1) ? $clog2(WIDTH_OUTPUT) : 1;

  logic [15:0]   ro [WIDTH_OUTPUT];
  logic [IW-1:0] idx;

  assign idx = IW'(wb.addr[12:0]);

  always_ff @(posedge clock or posedge reset)
    if (reset) begin
      for (int i = 0; i < WIDTH_OUTPUT; i++) ro[i] <= '0;
    end else if (sel && wb.wren && 32'(wb.addr[12:0]) < WIDTH_OUTPUT) begin
      ro[idx] <= wb.wrdata;
    end

  for (genvar g = 0; g < WIDTH_OUTPUT; g++) begin : g_flatten
    assign r_o[g*16 +: 16] = ro[g];
  end
endmodule
