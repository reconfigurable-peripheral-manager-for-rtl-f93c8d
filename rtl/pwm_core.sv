// pwm_core: fixed-frequency pulse generator shared by the PWM blocks.
//
// A counter runs from 0 to PERIOD-1 (PERIOD = CLK_HZ / PWM_HZ clocks) and
// pwm is high while the counter is below high_cycles, so the duty cycle is
// high_cycles / PERIOD. high_cycles is sampled when the counter wraps, so a
// change never cuts a pulse short; period_start marks that clock. pwm is
// registered: it changes one clock after the counter.
module pwm_core #(
  parameter int unsigned CLK_HZ = 100_000_000,
  parameter int unsigned PWM_HZ = 20_000,
  localparam int unsigned PERIOD = CLK_HZ / PWM_HZ,
  localparam int unsigned CW     = $clog2(PERIOD + 1)
) (
  input  logic          clock,
  input  logic          reset,
  input  logic [CW-1:0] high_cycles,
  output logic          period_start,
  output logic          pwm
);
  logic [CW-1:0] cnt, high_q;

  assign period_start = (cnt == '0);

  always_ff @(posedge clock or posedge reset)
    if (reset) begin
      cnt    <= '0;
      high_q <= '0;
      pwm    <= 1'b0;
    end else begin
      cnt <= (32'(cnt) == PERIOD - 1) ? '0 : cnt + 1'b1;
      if (period_start) high_q <= high_cycles;
      pwm <= period_start ? (high_cycles != '0) : (cnt < high_q);
    end
endmodule
