// tb_uart: the transmitter's frames are decoded by a testbench receiver
// that samples at the bit centres of a 115200-baud line (868 clocks per bit
// at 100 MHz), checking start and stop bits and the frame length; the
// receiver is fed frames built by the testbench, and must report each byte
// once with a one-clock ready. A request made while busy is sent after.
// A second instance at 9600 baud (10416 clocks per bit) sends and receives
// one frame each, with its bit time checked.
`timescale 1ns/1ps
module tb_uart;
  `include "tb_check.svh"
  localparam int BIT = 100_000_000 / 115_200;
  int checks = 0, failures = 0;
  logic clk = 0, reset = 0;
  logic [15:0] tx_reg, rx_word;
  logic tx, tx_busy, rx, rx_ready;
  logic [7:0] rx_data;
  int ready_count = 0;
  logic [7:0] got_bytes [$];
  always #5 clk = ~clk;
  initial #1 reset = 1;

  uart #(.CLK_HZ(100_000_000), .BAUD(115_200)) dut (.clock(clk), .reset(reset), .tx_reg(tx_reg),
    .tx(tx), .tx_busy(tx_busy), .rx(rx), .rx_data(rx_data), .rx_ready(rx_ready), .rx_word(rx_word));

  localparam int BIT9 = 100_000_000 / 9_600;
  logic [15:0] tx9_reg, rx9_word;
  logic tx9, tx9_busy, rx9, rx9_ready;
  logic [7:0] rx9_data;
  uart #(.CLK_HZ(100_000_000), .BAUD(9_600)) u9600 (.clock(clk), .reset(reset), .tx_reg(tx9_reg),
    .tx(tx9), .tx_busy(tx9_busy), .rx(rx9), .rx_data(rx9_data), .rx_ready(rx9_ready), .rx_word(rx9_word));

  always @(posedge clk) if (rx_ready) begin ready_count++; got_bytes.push_back(rx_data); end

  // testbench receiver on tx
  task automatic get_frame(output logic [7:0] b, output int len);
    int t0;
    @(negedge tx); t0 = $time;
    #(BIT * 10 / 2);
    `CHECK_EQ(tx, 1'b0, "start bit")
    for (int i = 0; i < 8; i++) begin #(BIT * 10); b[i] = tx; end
    #(BIT * 10);
    `CHECK_EQ(tx, 1'b1, "stop bit")
    wait (!tx_busy); len = ($time - t0) / 10;
  endtask

  task automatic send_frame(input logic [7:0] b);
    rx = 0; #(BIT * 10);
    for (int i = 0; i < 8; i++) begin rx = b[i]; #(BIT * 10); end
    rx = 1; #(BIT * 10);
  endtask

  initial begin
    #50000000; failures++; $display("FAIL: watchdog"); `TB_REPORT
  end

  initial begin
    logic [7:0] b;
    int len;
    logic [7:0] sent [6] = '{8'h55, 8'hA3, 8'h00, 8'hFF, 8'h5A, 8'h81};
    tx_reg = 16'h0000; rx = 1;
    tx9_reg = 16'h0000; rx9 = 1;
    #12 reset = 0;
    #1000;
    `CHECK_EQ(tx, 1'b1, "line idles high")
    // transmit: toggle bit 8 for each byte
    for (int i = 0; i < 4; i++) begin
      tx_reg = {7'b0, ~tx_reg[8], sent[i]};
      get_frame(b, len);
      `CHECK_EQ(b, sent[i], "transmitted byte")
      `CHECK(len >= 10 * BIT - 2 && len <= 10 * BIT + 4, $sformatf("frame length %0d clocks", len))
    end
    // two requests back to back: the second waits for the first
    tx_reg = {7'b0, ~tx_reg[8], sent[4]};
    #(BIT * 10 * 3);
    tx_reg = {7'b0, ~tx_reg[8], sent[5]};
    wait (!tx_busy);
    get_frame(b, len);
    `CHECK_EQ(b, sent[5], "queued byte sent after the busy one")
    // receive
    for (int i = 0; i < 6; i++) begin
      send_frame(sent[i]);
      #(BIT * 10 * 2);
    end
    `CHECK_EQ(ready_count, 6, "one ready per received byte")
    for (int i = 0; i < 6 && i < got_bytes.size(); i++) `CHECK_EQ(got_bytes[i], sent[i], "received byte")
    `CHECK_EQ(rx_word, {8'h01, sent[5]}, "register word carries the new-byte flag")
    // 9600 baud: one frame each way
    begin
      int t0;
      tx9_reg = {7'b0, 1'b1, 8'hC6};
      @(negedge tx9); t0 = $time;
      #(BIT9 * 10 / 2);
      `CHECK_EQ(tx9, 1'b0, "9600: start bit")
      for (int i = 0; i < 8; i++) begin #(BIT9 * 10); b[i] = tx9; end
      #(BIT9 * 10);
      `CHECK_EQ(tx9, 1'b1, "9600: stop bit")
      `CHECK_EQ(b, 8'hC6, "9600: transmitted byte")
      wait (!tx9_busy); len = ($time - t0) / 10;
      `CHECK(len >= 10 * BIT9 - 2 && len <= 10 * BIT9 + 4, $sformatf("9600: frame length %0d clocks", len))
      rx9 = 0; #(BIT9 * 10);
      for (int i = 0; i < 8; i++) begin rx9 = 1'(8'h3C >> i); #(BIT9 * 10); end
      rx9 = 1; #(BIT9 * 10 * 2);
      `CHECK_EQ(rx9_data, 8'h3C, "9600: received byte")
      `CHECK_EQ(rx9_word, 16'h013C, "9600: register word")
    end
    `TB_REPORT
  end
endmodule
