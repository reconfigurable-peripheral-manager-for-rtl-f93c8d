// tb_pwm_uni: at 20, 100 and 200 kHz from 100 MHz, measures the period
// (5000, 1000, 500 clocks) and the high time of each command against
// |value| * period / 100, with the dead zone, the enable, clamping of
// values past +-100 and negative values.
`timescale 1ns/1ps
module tb_pwm_uni;
  import pwm_cmd_pkg::*;
  `include "tb_check.svh"
  int checks = 0, failures = 0;
  logic clk = 0, reset = 0;
  pwm_cmd_t cmd;
  logic [2:0] pwm;
  localparam int HZ [3] = '{20_000, 100_000, 200_000};
  always #5 clk = ~clk;
  initial #1 reset = 1;

  for (genvar i = 0; i < 3; i++) begin : g_dut
    pwm_uni #(.CLK_HZ(100_000_000), .PWM_HZ(HZ[i])) u (.clock(clk), .reset(reset), .cmd(cmd), .pwm_out(pwm[i]));
  end

  // Counts high clocks over two periods of channel ch, and the distance
  // between two rising edges (0 if there is none).
  task automatic measure(input int ch, input int per, output int high2, output int rise_gap);
    int first, t;
    logic p;
    repeat (2 * per + 2) @(posedge clk);   // command latched
    high2 = 0; first = -1; rise_gap = 0; p = pwm[ch];
    for (t = 0; t < 2 * per; t++) begin
      @(posedge clk); #1;
      if (pwm[ch]) high2++;
      if (pwm[ch] && !p) begin
        if (first < 0) first = t; else if (rise_gap == 0) rise_gap = t - first;
      end
      p = pwm[ch];
    end
  endtask

  initial begin
    #5000000; failures++; $display("FAIL: watchdog"); `TB_REPORT
  end

  initial begin
    int high2, gap, per, pct, mag;
    int vals [8] = '{50, -30, 5, 100, 120, -128, 1, 0};
    cmd = '0;
    #12 reset = 0;
    for (int ch = 0; ch < 3; ch++) begin
      per = 100_000_000 / HZ[ch];
      for (int k = 0; k < 8; k++) begin
        cmd.value = 8'(vals[k]);
        cmd.deadzone = (k == 2) ? 4'd5 : 4'd0;      // 5 within a dead zone of 5
        cmd.enable = 1'b1;
        mag = vals[k] < 0 ? -vals[k] : vals[k];
        pct = (mag > 100) ? 100 : mag;
        if (mag <= int'(cmd.deadzone)) pct = 0;
        measure(ch, per, high2, gap);
        `CHECK_EQ(high2, 2 * pct * per / 100, $sformatf("%0d Hz value %0d high clocks", HZ[ch], vals[k]))
        if (pct > 0 && pct < 100) `CHECK_EQ(gap, per, $sformatf("%0d Hz period", HZ[ch]))
      end
      cmd.value = 8'd60; cmd.enable = 1'b0;
      measure(ch, per, high2, gap);
      `CHECK_EQ(high2, 0, "disabled output stays low")
    end
    `TB_REPORT
  end
endmodule
