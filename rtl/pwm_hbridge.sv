// pwm_hbridge: PWM driver for the four switches of an H-bridge.
//
// The bridge has S1 (high side) and S2 (low side) on one motor terminal and
// S3 (high side) and S4 (low side) on the other. The command is the same
// register as pwm_uni: signed value -100..100, dead zone, enable. A positive
// value switches the diagonal S1/S4 with the PWM, a negative one the
// diagonal S3/S2, so the motor turns either way at |value| percent; the
// other two switches stay off. Direction and duty change only at a period
// start, so both switches of one side are never on together. Output s[0] is
// S1 ... s[3] is S4.
module pwm_hbridge
  import pwm_cmd_pkg::*;
#(
  parameter int unsigned CLK_HZ = 100_000_000,
  parameter int unsigned PWM_HZ = 20_000
) (
  input  logic       clock,
  input  logic       reset,
  input  pwm_cmd_t   cmd,
  output logic [3:0] s
);
  localparam int unsigned PERIOD = CLK_HZ / PWM_HZ;
  localparam int unsigned STEP   = PERIOD / 100;
  localparam int unsigned CW     = $clog2(PERIOD + 1);

  if (PERIOD % 100 != 0) begin : g_bad_rate
    $error("pwm_hbridge: CLK_HZ / PWM_HZ must be a multiple of 100");
  end

  logic [CW-1:0] high_cycles;
  logic          period_start, pwm, reverse;

  assign high_cycles = CW'(32'(pwm_percent(cmd)) * STEP);

  pwm_core #(.CLK_HZ(CLK_HZ), .PWM_HZ(PWM_HZ)) u_core (
    .clock        (clock),
    .reset        (reset),
    .high_cycles  (high_cycles),
    .period_start (period_start),
    .pwm          (pwm)
  );

  // The direction is taken with the duty, at the start of a period.
  always_ff @(posedge clock or posedge reset)
    if (reset)             reverse <= 1'b0;
    else if (period_start) reverse <= cmd.value[7];

  assign s[0] = pwm && !reverse;   // S1
  assign s[3] = pwm && !reverse;   // S4
  assign s[2] = pwm &&  reverse;   // S3
  assign s[1] = pwm &&  reverse;   // S2

  a_no_shoot_through: assert property (@(posedge clock) disable iff (reset)
    !(s[0] && s[1]) && !(s[2] && s[3]));
endmodule
