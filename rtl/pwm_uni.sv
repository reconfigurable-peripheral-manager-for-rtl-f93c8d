// pwm_uni: unidirectional PWM output.
//
// The command register (pwm_cmd_pkg) gives a signed value of -100..100, a
// dead zone and an enable. The output is a PWM at PWM_HZ (20 kHz, 100 kHz
// or 200 kHz) whose duty cycle is |value| percent; the sign is ignored here
// (pwm_hbridge uses it). With enable low, or |value| not above the dead
// zone, the output stays low. The high time is |value| * PERIOD/100 clocks,
// exact because PERIOD is a multiple of 100 at the supported rates from a
// 100 MHz clock. A new command takes effect at the next period start.
module pwm_uni
  import pwm_cmd_pkg::*;
#(
  parameter int unsigned CLK_HZ = 100_000_000,
  parameter int unsigned PWM_HZ = 20_000
) (
  input  logic     clock,
  input  logic     reset,
  input  pwm_cmd_t cmd,
  output logic     pwm_out
);
  localparam int unsigned PERIOD = CLK_HZ / PWM_HZ;
  localparam int unsigned STEP   = PERIOD / 100;
  localparam int unsigned CW     = $clog2(PERIOD + 1);

  if (PERIOD % 100 != 0) begin : g_bad_rate
    $error("pwm_uni: CLK_HZ / PWM_HZ must be a multiple of 100");
  end

  logic [CW-1:0] high_cycles;
  logic          unused_start;

  assign high_cycles = CW'(32'(pwm_percent(cmd)) * STEP);

  pwm_core #(.CLK_HZ(CLK_HZ), .PWM_HZ(PWM_HZ)) u_core (
    .clock        (clock),
    .reset        (reset),
    .high_cycles  (high_cycles),
    .period_start (unused_start),
    .pwm          (pwm_out)
  );
endmodule
