// digital_in: digital input ports packed into one 16-bit read register.
//
// Up to 16 input pins are brought into the FPGA clock domain through two
// flip-flops each and presented side by side, pin k on word bit k, for an
// R_RI register; unused bits read 0. Latency two clocks. (Digital outputs
// need no logic of their own: each is one bit of a WR_RO register routed to
// its port, so software can change one bit by read-modify-write.)
module digital_in #(
  parameter int unsigned N = 1
) (
  input  logic         clock,
  input  logic         reset,
  input  logic [N-1:0] pins,
  output logic [15:0]  word
);
  if (N < 1 || N > 16) begin : g_bad_n
    $error("digital_in: 1 to 16 inputs per register");
  end

  logic [N-1:0] meta, stable;

  always_ff @(posedge clock or posedge reset)
    if (reset) begin
      meta   <= '0;
      stable <= '0;
    end else begin
      meta   <= pins;
      stable <= meta;
    end

  assign word = 16'(stable);
endmodule
