// tb_io_ports: output ports carry the out vector and are enabled; input
// ports feed the in vector; an output port reads 0 on in.
`timescale 1ns/1ps
module tb_io_ports;
  `include "tb_check.svh"
  localparam logic [21:0] DIR = 22'b10_0011_1001_1101_1110_1111;
  int checks = 0, failures = 0;
  logic [21:0] out, in, pad_i, pad_o, pad_oe;

  io_ports #(.NUM_PORTS(22), .PORT_IS_OUT(DIR)) dut (.out(out), .in(in), .pad_i(pad_i),
                                                     .pad_o(pad_o), .pad_oe(pad_oe));
  initial begin
    #100000; failures++; $display("FAIL: watchdog"); `TB_REPORT
  end
  initial begin
    for (int t = 0; t < 200; t++) begin
      out = 22'($urandom); pad_i = 22'($urandom);
      #1;
      for (int p = 0; p < 22; p++) begin
        `CHECK_EQ(pad_oe[p], DIR[p], "direction")
        if (DIR[p]) begin
          `CHECK_EQ(pad_o[p], out[p], "output port")
          `CHECK_EQ(in[p], 1'b0, "output port reads 0")
        end else begin
          `CHECK_EQ(in[p], pad_i[p], "input port")
        end
      end
    end
    `TB_REPORT
  end
endmodule
