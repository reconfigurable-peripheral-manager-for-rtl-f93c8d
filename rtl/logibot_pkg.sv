// logibot_pkg: types and constants shared by the peripheral manager.
//
// The 16-bit Wishbone subset used inside the FPGA carries an address, the
// write data and a write enable from the GPMC bridge to every block; each
// block answers with 16-bit read data. The address space is split by its
// three most significant bits (see wb_decoder), and the upper half holds up
// to eight memories placed in 4K-word slots by a fixed allocation.
package logibot_pkg;

  localparam int unsigned WB_AW = 16;
  localparam int unsigned WB_DW = 16;

  // Request from the bus master to the slaves.
  typedef struct packed {
    logic [WB_AW-1:0] addr;
    logic [WB_DW-1:0] wrdata;
    logic             wren;
  } wb_req_t;

  // Region codes held in addr[15:13].
  typedef enum logic [2:0] {
    REG_W_RO  = 3'b000,   //  0K: output registers, write only
    REG_WR_RO = 3'b001,   //  8K: output registers, write and read
    REG_R_RI  = 3'b010,   // 16K: input registers, read only
    REG_RW_RI = 3'b011    // 24K: input registers, read and write
  } region_e;             // 32K..64K (addr[15] = 1): memories

  // Fixed words at the first two R_RI registers, used to test the link.
  localparam logic [15:0] RI_MAGIC0 = 16'hDEAD;
  localparam logic [15:0] RI_MAGIC1 = 16'hBEEF;

  localparam int unsigned MAX_MEMS  = 8;

  // Slot (0..7, i.e. 32K + 4K*slot) where memory m (0-based) starts.
  // Memory 1 at 32K, 5 at 36K, 4 at 40K, 6 at 44K, 2 at 48K, 7 at 52K,
  // 3 at 56K, 8 at 60K.
  function automatic int unsigned mem_slot_start(int unsigned m);
    case (m)
      0: return 0;  1: return 4;  2: return 6;  3: return 2;
      4: return 1;  5: return 3;  6: return 5;  default: return 7;
    endcase
  endfunction

  // Number of 4K slots owned by memory m when n memories exist: from its
  // start slot up to the start of the next memory that exists, or the end.
  function automatic int unsigned mem_slot_count(int unsigned n, int unsigned m);
    int unsigned s, e;
    s = mem_slot_start(m);
    e = 8;
    for (int unsigned k = 0; k < MAX_MEMS; k++)
      if (k < n && mem_slot_start(k) > s && mem_slot_start(k) < e)
        e = mem_slot_start(k);
    return e - s;
  endfunction

  function automatic int unsigned clog2_min1(int unsigned v);
    return (v <= 2) ? 1 : $clog2(v);
  endfunction

endpackage
