// gpmc_sync: "two flip-flop" synchronizer for the GPMC signals.
//
// The BeagleBone's GPMC clock runs only during a transfer, so the FPGA works
// from its own clock. Each GPMC signal is first captured by a flop on the
// GPMC clock (its clock input carries an inversion bubble, so it samples on
// the falling edge, in the middle of the host's bit cell), then passes two
// flops on the FPGA clock. Three flops in all; the value leaving the last
// one is safe to use. Latency: up to half a GPMC clock plus two FPGA clocks.
//
// Interface: d (W bits, GPMC domain) -> q (FPGA domain). The reset value is
// a parameter so that active-low strobes can come out of reset inactive.
module gpmc_sync #(
  parameter int unsigned W        = 1,
  parameter logic [W-1:0] RST_VAL = '0
) (
  input  logic         gpmc_clk,
  input  logic         fpga_clk,
  input  logic         reset,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  logic [W-1:0] cap, meta;

  always_ff @(negedge gpmc_clk or posedge reset)
    if (reset) cap <= RST_VAL;
    else       cap <= d;

  always_ff @(posedge fpga_clk or posedge reset)
    if (reset) begin
      meta <= RST_VAL;
      q    <= RST_VAL;
    end else begin
      meta <= cap;
      q    <= meta;
    end
endmodule
