// gpmc_host: behavioural model of the BeagleBone GPMC master, for
// simulation only.
//
// It performs the synchronous, non-burst, address/data multiplexed accesses
// the bridge expects, with a free-running-during-transfer GPMC clock of
// PERIOD_NS:
//   write: clock 1 address with ADVn low, clocks 2-3 data with WEn low,
//          CSn high at the start of clock 3's second half (3 clocks);
//   read:  clock 1 address with ADVn low, then AD released and OEn low
//          for four clocks; the host samples AD at the end of clock 5 and
//          ends the access in clock 6 (6 clocks).
// CSn, OEn and WEn rise together at the end of the access. The model's
// tasks are called by hierarchical reference from the testbench.
module gpmc_host #(
  parameter int PERIOD_NS = 40
) (
  output logic        gpmc_clk,
  output logic [15:0] ad_drv,
  output logic        ad_drv_en,
  input  logic [15:0] ad_from_fpga,
  input  logic        ad_fpga_oe,
  output logic        advn,
  output logic        csn,
  output logic        oen,
  output logic        wen,
  output logic [1:0]  ben
);
  localparam int H = PERIOD_NS / 2;
  int unsigned n_writes = 0, n_reads = 0;

  initial begin
    gpmc_clk = 0; ad_drv = '0; ad_drv_en = 0;
    advn = 1; csn = 1; oen = 1; wen = 1; ben = 2'b00;
  end

  task automatic write16(input logic [15:0] addr, input logic [15:0] data);
    csn = 0; advn = 0; ad_drv = addr; ad_drv_en = 1; gpmc_clk = 1;
    #(H) gpmc_clk = 0;
    #(H) gpmc_clk = 1; advn = 1; wen = 0; ad_drv = data;
    #(H) gpmc_clk = 0;
    #(H) gpmc_clk = 1; csn = 1; wen = 1;
    #(H) gpmc_clk = 0;
    #(H) ad_drv_en = 0;
    n_writes++;
  endtask

  task automatic read16(input logic [15:0] addr, output logic [15:0] data);
    csn = 0; advn = 0; ad_drv = addr; ad_drv_en = 1; gpmc_clk = 1;
    #(H) gpmc_clk = 0;
    #(H) gpmc_clk = 1; advn = 1; oen = 0; ad_drv_en = 0;
    for (int c = 0; c < 3; c++) begin
      #(H) gpmc_clk = 0;
      #(H) gpmc_clk = 1;
    end
    #(H) gpmc_clk = 0;
    // end of clock 5: sample the word the FPGA drives
    #(H) data = ad_fpga_oe ? ad_from_fpga : 16'h0000;
    gpmc_clk = 1; csn = 1; oen = 1;
    #(H) gpmc_clk = 0;
    #(H);
    n_reads++;
  endtask
endmodule
