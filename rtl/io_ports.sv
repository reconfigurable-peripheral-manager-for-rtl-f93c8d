// io_ports: direction selection of the board's general-purpose ports.
//
// Each of the NUM_PORTS pins is fixed at build time as an output or an
// input by one bit of PORT_IS_OUT. Peripherals never see pins directly:
// they drive the out vector and read the in vector at the index of the port
// they were given, so moving a peripheral to another port only changes an
// index. For an output port, pad_o carries out[k] and pad_oe[k] is 1, and
// in[k] reads 0. For an input port, in[k] follows the pin, pad_oe[k] is 0
// and out[k] is ignored. Port k: PMOD1_0..7 are 0..7, PMOD2_0..7 are
// 8..15, ARD_0..5 are 16..21. Purely combinational.
module io_ports #(
  parameter int unsigned              NUM_PORTS   = 22,
  parameter logic [NUM_PORTS-1:0]     PORT_IS_OUT = '0
) (
  input  logic [NUM_PORTS-1:0] out,
  output logic [NUM_PORTS-1:0] in,
  input  logic [NUM_PORTS-1:0] pad_i,
  output logic [NUM_PORTS-1:0] pad_o,
  output logic [NUM_PORTS-1:0] pad_oe
);
  assign pad_oe = PORT_IS_OUT;
  assign pad_o  = out & PORT_IS_OUT;
  assign in     = pad_i & ~PORT_IS_OUT;
endmodule
