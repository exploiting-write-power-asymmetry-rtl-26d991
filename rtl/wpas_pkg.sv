// wpas_pkg: shared sizes and types of the write-power-asymmetry scheduling (WPAS)
// design. A 64-byte cache line is spread over the eight x8 PCM chips of a rank:
// the line travels as a burst of eight 64-bit beats and chip c owns byte lane c of
// every beat. Each line carries one 4-bit modification counter per chip. The
// memory geometry follows the evaluated main memory (2 ranks per channel, 8 banks
// per rank, 32768 rows per bank, 1024 columns per row); the column size of 8 bytes
// (one beat) and the single channel are this design's own reading.
package wpas_pkg;

  localparam int unsigned LINE_BITS = 512;        // 64 B cache line
  localparam int unsigned CHIPS     = 8;          // chips per rank
  localparam int unsigned CHIP_DQ   = 8;          // data pins per chip (x8)
  localparam int unsigned BUS_W     = CHIPS * CHIP_DQ;   // 64-bit channel
  localparam int unsigned BEATS     = LINE_BITS / BUS_W; // burst length 8
  localparam int unsigned CHIP_BITS = LINE_BITS / CHIPS; // 64 bits of a line per chip
  localparam int unsigned CNT_W     = 4;          // modification counter per chip

  localparam int unsigned RANKS  = 2;
  localparam int unsigned BANKS  = 8;
  localparam int unsigned RANK_W = $clog2(RANKS);
  localparam int unsigned BANK_W = $clog2(BANKS);
  localparam int unsigned ROW_W  = 15;            // 32768 rows per bank
  localparam int unsigned COL_W  = 7;             // 1024 columns / 8 columns per line
  localparam int unsigned LADDR_W = RANK_W + BANK_W + ROW_W + COL_W; // line address

  typedef logic [LINE_BITS-1:0] line_t;
  typedef logic [LADDR_W-1:0]   laddr_t;
  typedef logic [CNT_W-1:0]     modcnt_t;
  typedef modcnt_t [CHIPS-1:0]  modvec_t;

  typedef enum logic {TXN_READ = 1'b0, TXN_WRITE = 1'b1} txn_kind_e;

  // Transaction from the LLC to the memory controller (a miss fill request or an
  // eviction of a dirty line with its counters).
  typedef struct packed {
    txn_kind_e kind;
    laddr_t    addr;
    line_t     data;
    modvec_t   mods;
  } txn_t;

  // Decoded PCM location of a line.
  typedef struct packed {
    logic [RANK_W-1:0] rank;
    logic [BANK_W-1:0] bank;
    logic [ROW_W-1:0]  row;
    logic [COL_W-1:0]  col;
  } maddr_t;

  // Command held in a per-rank command queue.
  typedef struct packed {
    txn_kind_e kind;
    maddr_t    ma;
    laddr_t    addr;   // returned with read data as its tag
    line_t     data;
    modvec_t   mods;   // memory controller's copy of the line's counters
  } cmd_t;

  // Bits of chip c in a line: byte lane c of each of the BEATS beats.
  function automatic logic [CHIP_BITS-1:0] chip_slice(line_t l, int unsigned c);
    logic [CHIP_BITS-1:0] s;
    for (int unsigned b = 0; b < BEATS; b++)
      s[b*CHIP_DQ +: CHIP_DQ] = l[b*BUS_W + c*CHIP_DQ +: CHIP_DQ];
    return s;
  endfunction

endpackage
