// mem_bank: up to eight dual-port memories in the upper half of the
// Wishbone address space.
//
// The addresses 32K..64K are cut into eight 4K-word slots. Memory 1 starts
// at 32K, 5 at 36K, 4 at 40K, 6 at 44K, 2 at 48K, 7 at 52K, 3 at 56K and 8 at
// 60K; each memory owns the slots from its start up to the next memory that
// exists. One memory thus may span all 32K, two get 16K each, three get
// 16K/8K/8K, four 8K each, and so on down to 4K each for eight. Since every
// region is an aligned power of two, selecting a memory is a compare on
// addr[14:12] and the word address is the low address bits.
//
// Memory m has MEM_SIZE[m] words of MEM_WIDTH[m] bits (8 to 16); narrower
// words read back zero-extended. Port A of each dpram is on the Wishbone,
// port B on the peripheral arrays b_* (index m). Wishbone reads return the
// word one clock after the address; writes take one clock. Inside a
// region, addresses past the memory's size wrap onto its words when the
// size is a power of two; software should stay inside the size.
module mem_bank
  import logibot_pkg::*;
#(
  parameter int unsigned MEM_NUMBER            = 2,
  parameter int unsigned MEM_SIZE  [MAX_MEMS]  = '{1024, 512, 64, 64, 64, 64, 64, 64},
  parameter int unsigned MEM_WIDTH [MAX_MEMS]  = '{16, 8, 16, 16, 16, 16, 16, 16}
) (
  input  logic                         clock,
  input  logic                         reset,
  input  wb_req_t                      wb,
  input  logic                         sel,
  output logic [15:0]                  rddata,
  // peripheral side, one entry per memory
  input  logic [MEM_NUMBER-1:0]        b_en,
  input  logic [MEM_NUMBER-1:0]        b_we,
  input  logic [MEM_NUMBER-1:0][14:0]  b_addr,
  input  logic [MEM_NUMBER-1:0][15:0]  b_din,
  output logic [MEM_NUMBER-1:0][15:0]  b_dout
);
  logic [MEM_NUMBER-1:0][15:0] a_dout;
  logic [MEM_NUMBER-1:0]       hit, hit_q;

  for (genvar m = 0; m < MEM_NUMBER; m++) begin : g_mem
    localparam int unsigned START = mem_slot_start(m);
    localparam int unsigned COUNT = mem_slot_count(MEM_NUMBER, m);
    localparam int unsigned W     = MEM_WIDTH[m];
    localparam int unsigned D     = MEM_SIZE[m];
    localparam int unsigned AW    = clog2_min1(D);

    if (D > COUNT * 4096 || W < 1 || W > 16) begin : g_bad_size
      $error("mem_bank: memory %0d does not fit its %0d-slot region", m, COUNT);
    end

    logic [W-1:0] a_q, b_q;

    // slot - START wraps to 9..15 below START, so one compare suffices
    assign hit[m] = sel && (({1'b0, wb.addr[14:12]} - 4'(START)) < 4'(COUNT));

    dpram #(.WIDTH(W), .DEPTH(D)) u_ram (
      .clock  (clock),
      .a_en   (hit[m]),
      .a_we   (wb.wren),
      .a_addr (wb.addr[AW-1:0]),
      .a_din  (wb.wrdata[W-1:0]),
      .a_dout (a_q),
      .b_en   (b_en[m]),
      .b_we   (b_we[m]),
      .b_addr (b_addr[m][AW-1:0]),
      .b_din  (b_din[m][W-1:0]),
      .b_dout (b_q)
    );

    assign a_dout[m] = 16'(a_q);
    assign b_dout[m] = 16'(b_q);
  end

  always_ff @(posedge clock or posedge reset)
    if (reset) hit_q <= '0;
    else       hit_q <= hit;

  always_comb begin
    rddata = '0;
    for (int m = 0; m < MEM_NUMBER; m++)
      if (hit_q[m]) rddata = a_dout[m];
  end
endmodule
