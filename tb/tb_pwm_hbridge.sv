// tb_pwm_hbridge: positive values drive S1 and S4, negative ones S3 and S2,
// with |value| percent duty at 20 kHz; the idle pair stays off and a leg
// never has both switches on.
`timescale 1ns/1ps
module tb_pwm_hbridge;
  import pwm_cmd_pkg::*;
  `include "tb_check.svh"
  localparam int PER = 5000;
  int checks = 0, failures = 0;
  logic clk = 0, reset = 0;
  pwm_cmd_t cmd;
  logic [3:0] s;
  int shoot = 0;
  always #5 clk = ~clk;
  initial #1 reset = 1;

  pwm_hbridge #(.CLK_HZ(100_000_000), .PWM_HZ(20_000)) dut (.clock(clk), .reset(reset), .cmd(cmd), .s(s));

  always @(posedge clk) if ((s[0] && s[1]) || (s[2] && s[3])) shoot++;

  initial begin
    #5000000; failures++; $display("FAIL: watchdog"); `TB_REPORT
  end

  initial begin
    int h [4];
    int vals [6] = '{40, -40, 100, -75, 3, -100};
    int pct;
    cmd = '0;
    #12 reset = 0;
    foreach (vals[k]) begin
      cmd.value = 8'(vals[k]); cmd.enable = 1; cmd.deadzone = 4'd3;
      repeat (2 * PER + 2) @(posedge clk);
      h = '{0, 0, 0, 0};
      repeat (2 * PER) begin
        @(posedge clk); #1;
        for (int i = 0; i < 4; i++) if (s[i]) h[i]++;
      end
      pct = vals[k] < 0 ? -vals[k] : vals[k];
      if (pct <= 3) pct = 0;
      if (vals[k] > 0) begin
        `CHECK_EQ(h[0], 2 * pct * PER / 100, "S1 duty")
        `CHECK_EQ(h[3], 2 * pct * PER / 100, "S4 duty")
        `CHECK_EQ(h[1] + h[2], 0, "S2/S3 off going forward")
      end else begin
        `CHECK_EQ(h[2], 2 * pct * PER / 100, "S3 duty")
        `CHECK_EQ(h[1], 2 * pct * PER / 100, "S2 duty")
        `CHECK_EQ(h[0] + h[3], 0, "S1/S4 off in reverse")
      end
    end
    `CHECK_EQ(shoot, 0, "no leg shorted")
    `TB_REPORT
  end
endmodule
