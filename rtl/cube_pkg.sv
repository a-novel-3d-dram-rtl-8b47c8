// cube_pkg: shared constants and types of the memory-cube logic controller.
//
// The cube holds 14 DDR3 x16 dies: 8 carry the 128-bit data word, 5 carry the
// 80 BCH parity bits and 1 is a cold spare. One host transaction moves one
// DDR3 burst of 8 beats; each beat is one 128-bit word, which becomes a
// 208-bit code word (13 lanes of 16 bits) on its way to the dies.
// The die counts, the x16 width, the 8 Gb die and the 80 parity bits follow the
// cube description; the burst-address split, the request word layout and the
// DDR3 timing values (DDR3-1866 numbers rounded up to controller cycles of
// 2.426 ns) are this design's own choices.
package cube_pkg;

  localparam int NUM_DATA_DIES  = 8;
  localparam int NUM_ECC_DIES   = 5;
  localparam int NUM_SPARE_DIES = 1;
  localparam int NUM_LANES      = NUM_DATA_DIES + NUM_ECC_DIES;   // 13 coded lanes
  localparam int NUM_DIES       = NUM_LANES + NUM_SPARE_DIES;     // 14 physical dies
  localparam int DQ_W           = 16;                             // x16 dies
  localparam int DATA_W         = NUM_DATA_DIES * DQ_W;           // 128
  localparam int PAR_W          = NUM_ECC_DIES * DQ_W;            // 80
  localparam int CODE_W         = NUM_LANES * DQ_W;               // 208
  localparam int BL             = 8;                              // burst length
  localparam int BURST_W        = BL * DQ_W;                      // bits per die per burst

  // 8 Gb x16 DDR3 die: 8 banks, 64K rows, 1K columns
  localparam int BA_W     = 3;
  localparam int NUM_BANKS = 1 << BA_W;
  localparam int ROW_W    = 16;
  localparam int COL_W    = 10;
  localparam int BCOL_W   = COL_W - 3;                 // burst (BL8) column index
  localparam int BADDR_W  = ROW_W + BA_W + BCOL_W;     // 26-bit burst address
  localparam int CUBE_W   = 4;

  // Host request word: {op, cube id, burst address} = 2 + 4 + 26 = 32 bits.
  typedef enum logic [1:0] {
    OP_NOP   = 2'd0,
    OP_READ  = 2'd1,
    OP_WRITE = 2'd2,
    OP_CFG   = 2'd3
  } op_e;

  typedef struct packed {
    op_e                op;
    logic [CUBE_W-1:0]  cube;
    logic [BADDR_W-1:0] addr;
  } host_req_t;

  // Burst address layout: {row, bank, burst column}. Consecutive bursts stay
  // in one row, so streaming traffic hits the open page.
  typedef struct packed {
    logic [ROW_W-1:0]  row;
    logic [BA_W-1:0]   bank;
    logic [BCOL_W-1:0] col;
  } baddr_t;

  // Who issued a request; read data is routed back by this tag.
  typedef enum logic [1:0] {
    SRC_HOST    = 2'd0,
    SRC_SCRUB   = 2'd1,
    SRC_REBUILD = 2'd2,
    SRC_BIST    = 2'd3
  } src_e;

  // Request as it enters the DRAM controller.
  typedef struct packed {
    logic   write;
    src_e   src;
    baddr_t addr;
  } ctrl_req_t;

  localparam int NSLOT  = 8;              // write-data slots
  localparam int SLOT_W = $clog2(NSLOT);
  localparam int TS_W   = 8;              // arrival time stamp for FCFS age

  // Entry of a per-bank request queue (the bank is implied by the queue).
  typedef struct packed {
    logic              write;
    src_e              src;
    logic [ROW_W-1:0]  row;
    logic [BCOL_W-1:0] col;
    logic [SLOT_W-1:0] slot;
    logic [TS_W-1:0]   ts;
  } q_entry_t;

  // Diagnostic log record.
  typedef struct packed {
    src_e                 src;
    baddr_t               addr;
    logic                 ce;         // corrected error(s)
    logic                 ue;         // uncorrectable error
    logic                 miscompare; // BIST data mismatch
    logic [NUM_LANES-1:0] lanes;      // lanes with corrected bits
  } diag_rec_t;

  // DRAM commands as driven on {cs_n, ras_n, cas_n, we_n} (DDR3 truth table)
  typedef enum logic [3:0] {
    CMD_NOP = 4'b0111,
    CMD_ACT = 4'b0011,
    CMD_RD  = 4'b0101,
    CMD_WR  = 4'b0100,
    CMD_PRE = 4'b0010,
    CMD_REF = 4'b0001,
    CMD_DES = 4'b1111
  } ddr_cmd_e;

  // Timing in controller cycles (2.426 ns): DDR3-1866, 8 Gb die.
  localparam int T_RCD  = 6;     // 13.91 ns
  localparam int T_RP   = 6;     // 13.91 ns
  localparam int T_RAS  = 14;    // 34 ns
  localparam int T_WR   = 7;     // 15 ns + burst
  localparam int T_RTP  = 4;     // 7.5 ns
  localparam int T_RFC  = 145;   // 350 ns (8 Gb)
  localparam int T_REFI = 3215;  // 7.8 us
  localparam int T_XP   = 3;     // power-down exit
  localparam int T_CKE  = 3;     // minimum power-down residency

endpackage
