// tb_servo_ctrl: with a 1 MHz clock (one clock per microsecond) checks the
// 20 ms frame and pulse widths of 1000, 1500 and 2000 us, a zero width and
// the clamp to the frame.
`timescale 1ns/1ps
module tb_servo_ctrl;
  `include "tb_check.svh"
  localparam int FRAME = 20000;
  int checks = 0, failures = 0;
  logic clk = 0, reset = 0, so;
  logic [15:0] w;
  always #500 clk = ~clk;
  initial #1 reset = 1;

  servo_ctrl #(.CLK_HZ(1_000_000), .SERVO_HZ(50)) dut (.clock(clk), .reset(reset), .width_us(w), .servo_out(so));

  initial begin
    #1000000000; failures++; $display("FAIL: watchdog"); `TB_REPORT
  end

  initial begin
    int ws [5] = '{1000, 1500, 2000, 0, 30000};
    int high, first, gap, t;
    logic p;
    w = 0;
    #1200 reset = 0;
    foreach (ws[k]) begin
      w = 16'(ws[k]);
      repeat (2 * FRAME + 2) @(posedge clk);
      high = 0; first = -1; gap = 0; p = so;
      for (t = 0; t < 2 * FRAME; t++) begin
        @(posedge clk); #1;
        if (so) high++;
        if (so && !p) begin if (first < 0) first = t; else if (gap == 0) gap = t - first; end
        p = so;
      end
      `CHECK_EQ(high, 2 * ((ws[k] > FRAME) ? FRAME : ws[k]), $sformatf("pulse of %0d us", ws[k]))
      if (ws[k] > 0 && ws[k] < FRAME) `CHECK_EQ(gap, FRAME, "20 ms frame")
    end
    `TB_REPORT
  end
endmodule
