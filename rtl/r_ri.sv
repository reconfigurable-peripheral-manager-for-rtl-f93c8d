// r_ri: read-only input "registers" (R_RI).
//
// Despite its name this block holds no flops: peripherals present their
// words on the flattened bus ri (word k at ri[16k +: 16]) and the block
// returns word addr[12:0] to the Wishbone, or 0 past the end. Words 0 and 1
// are always the constants 0xDEAD and 0xBEEF, which software reads to test
// the link; peripheral words start at index 2 (ri words 0 and 1 are not
// used). The read is combinational.
module r_ri
  import logibot_pkg::*;
#(
  parameter int unsigned WIDTH_INPUT = 3
) (
  input  wb_req_t                     wb,
  input  logic [WIDTH_INPUT*16-1:0]   ri,
  output logic [15:0]                 rddata
);
  localparam int unsigned IW = $clog2(WIDTH_INPUT);

  logic [15:0]   words [WIDTH_INPUT];
  logic [IW-1:0] idx;

  assign idx = IW'(wb.addr[12:0]);

  for (genvar g = 0; g < WIDTH_INPUT; g++) begin : g_words
    if (g == 0)      begin : g_m0 assign words[g] = RI_MAGIC0; end
    else if (g == 1) begin : g_m1 assign words[g] = RI_MAGIC1; end
    else             begin : g_p  assign words[g] = ri[g*16 +: 16]; end
  end

  assign rddata = (32'(wb.addr[12:0]) < WIDTH_INPUT) ? words[idx] : '0;

  logic unused;
  assign unused = ^ri[31:0] ^ wb.wren ^ ^wb.wrdata ^ ^wb.addr[15:13];
endmodule
