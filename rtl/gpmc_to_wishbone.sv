// gpmc_to_wishbone: bridge from the BeagleBone GPMC bus to the internal
// 16-bit Wishbone subset (address, write data, read data, write enable).
//
// GPMC multiplexes address and data on the 16-bit AD bus. The host puts the
// address on AD with ADVn low, then either drives data with WEn low (write,
// three GPMC clocks) or releases AD and pulls OEn low (read, six GPMC clocks)
// while the FPGA drives the read word back. CSn frames the transfer.
//
// How it works: AD, ADVn, CSn, OEn and WEn pass a gpmc_sync (one flop on the
// GPMC clock, two on the FPGA clock). In the FPGA domain
//   * wb.addr follows AD while CSn and ADVn are low, and then holds;
//   * wb.wrdata follows AD at all times; it only matters while wb.wren is 1;
//   * wb.wren is a single-cycle pulse one FPGA clock after WEn is seen
//     falling inside an active CSn, so the data it writes has been stable
//     for at least one clock;
//   * the read word (wb_rddata, from the address decoder) is registered onto
//     ad_o every cycle; ad_oe is raised while the synchronized CSn and OEn
//     are both low, and dropped at once by the raw CSn or OEn pin.
// The bidirectional AD pins are split into ad_i / ad_o / ad_oe; the pad
// buffer that joins them is outside this module. BEn is accepted because the
// GPMC provides it, but every access here is a full 16-bit word, so it is
// not used.
//
// Timing at 25 MHz GPMC / 100 MHz FPGA: the address reaches wb.addr about
// 40 ns after ADVn is sampled; read data is on AD about 60 ns after OEn
// falls, well inside the six-clock read. Following the document: the
// signal set, the two-flop synchronizer and the Wishbone signals. This
// design's own choices: the edge detection for wren and its one-cycle width.
module gpmc_to_wishbone
  import logibot_pkg::*;
(
  input  logic        fpga_clk,
  input  logic        reset,
  // GPMC side
  input  logic        gpmc_clk,
  input  logic [15:0] gpmc_ad_i,
  output logic [15:0] gpmc_ad_o,
  output logic        gpmc_ad_oe,
  input  logic        gpmc_advn,
  input  logic        gpmc_csn,
  input  logic        gpmc_oen,
  input  logic        gpmc_wen,
  input  logic [1:0]  gpmc_ben,
  // Wishbone side
  output wb_req_t     wb,
  input  logic [15:0] wb_rddata
);
  typedef struct packed {
    logic [15:0] ad;
    logic        advn;
    logic        csn;
    logic        oen;
    logic        wen;
  } gpmc_bus_t;

  gpmc_bus_t raw, s;
  logic      wen_prev, wr_pending, oe_q;

  assign raw = '{ad: gpmc_ad_i, advn: gpmc_advn, csn: gpmc_csn,
                 oen: gpmc_oen, wen: gpmc_wen};

  gpmc_sync #(.W($bits(gpmc_bus_t)), .RST_VAL({16'h0000, 4'b1111})) u_sync (
    .gpmc_clk (gpmc_clk),
    .fpga_clk (fpga_clk),
    .reset    (reset),
    .d        (raw),
    .q        (s)
  );

  always_ff @(posedge fpga_clk or posedge reset)
    if (reset) begin
      wb         <= '0;
      wen_prev   <= 1'b1;
      wr_pending <= 1'b0;
      gpmc_ad_o  <= '0;
      oe_q       <= 1'b0;
    end else begin
      wen_prev   <= s.wen;
      wb.wrdata  <= s.ad;
      if (!s.csn && !s.advn)
        wb.addr <= s.ad;
      wr_pending <= !s.csn && !s.wen && wen_prev;
      wb.wren    <= wr_pending;
      gpmc_ad_o  <= wb_rddata;
      oe_q       <= !s.csn && !s.oen;
    end

  // The host may drive AD again right after it raises CSn or OEn, before
  // the synchronized copies follow; the raw pins therefore also gate the
  // output enable, so the bridge lets go of AD at once.
  assign gpmc_ad_oe = oe_q && !gpmc_csn && !gpmc_oen;

  // Byte enables are not used: all transfers are 16-bit words.
  logic unused_ben;
  assign unused_ben = ^gpmc_ben;

  // A write strobe lasts exactly one clock.
  a_wren_pulse: assert property (@(posedge fpga_clk) disable iff (reset)
    wb.wren |=> !wb.wren);
endmodule
