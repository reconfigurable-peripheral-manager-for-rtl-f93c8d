// dpram: true dual-port RAM, DEPTH words of WIDTH bits.
//
// Port A is the Wishbone side, port B the peripheral side (a custom memory
// block or any peripheral that streams data). Both ports are synchronous:
// with en high, a write stores din at addr on the rising clock, and dout
// returns the word at addr one clock later (read-before-write when the same
// port writes). Both ports share one clock. If both ports write the same
// word in one clock, port B wins. Written as an array so that FPGA tools map
// it to block RAM.
module dpram #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned AW   = (DEPTH <= 2) ? 1 : $clog2(DEPTH)
) (
  input  logic             clock,
  // port A
  input  logic             a_en,
  input  logic             a_we,
  input  logic [AW-1:0]    a_addr,
  input  logic [WIDTH-1:0] a_din,
  output logic [WIDTH-1:0] a_dout,
  // port B
  input  logic             b_en,
  input  logic             b_we,
  input  logic [AW-1:0]    b_addr,
  input  logic [WIDTH-1:0] b_din,
  output logic [WIDTH-1:0] b_dout
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clock) begin
    if (a_en) begin
      if (a_we && 32'(a_addr) < DEPTH) mem[a_addr] <= a_din;
      a_dout <= mem[a_addr];
    end
    if (b_en) begin
      if (b_we && 32'(b_addr) < DEPTH) mem[b_addr] <= b_din;
      b_dout <= mem[b_addr];
    end
  end
endmodule
