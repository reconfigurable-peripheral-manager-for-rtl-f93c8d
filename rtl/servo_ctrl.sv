// servo_ctrl: hobby servo pulse generator.
//
// The output repeats at a fixed SERVO_HZ (50 Hz, a 20 ms frame). A servo
// reads its position from the width of the high pulse, not from a duty
// cycle, so the command register gives that width directly in microseconds
// (1000..2000 is the usual range; values past the frame are clamped to it).
// The high time is width_us * CLK_HZ / 1e6 clocks, taken at the start of
// each frame; the output is registered.
module servo_ctrl #(
  parameter int unsigned CLK_HZ   = 100_000_000,
  parameter int unsigned SERVO_HZ = 50
) (
  input  logic        clock,
  input  logic        reset,
  input  logic [15:0] width_us,
  output logic        servo_out
);
  localparam int unsigned FRAME  = CLK_HZ / SERVO_HZ;
  localparam int unsigned PER_US = CLK_HZ / 1_000_000;
  localparam int unsigned FW     = $clog2(FRAME + 1);

  logic [FW-1:0] cnt, high_q, high_cycles;
  logic [31:0]   req;

  assign req         = 32'(width_us) * PER_US;
  assign high_cycles = (req > FRAME) ? FW'(FRAME) : FW'(req);

  always_ff @(posedge clock or posedge reset)
    if (reset) begin
      cnt       <= '0;
      high_q    <= '0;
      servo_out <= 1'b0;
    end else begin
      cnt <= (32'(cnt) == FRAME - 1) ? '0 : cnt + 1'b1;
      if (cnt == '0) begin
        high_q    <= high_cycles;
        servo_out <= (high_cycles != '0);
      end else begin
        servo_out <= (cnt < high_q);
      end
    end
endmodule
