// umc_pkg: types and constants shared by the unified LLC/DRAM controller.
//
// The DRAM channel is organised as in the evaluated system: one channel, two
// ranks of eight banks each (16 banks), 4 GB in total, hence a 32-bit byte
// address. The line size (64 bytes) and the address map are this design's
// choice: row | rank | bank | column | offset, so that consecutive lines of a
// 2 KB row stay in one bank and neighbouring rows spread over all 16 banks.
//
// Request sources: a request reaching DRAM is a last-level-cache read miss, a
// dirty-line writeback from the cache, or cache-bypassing real-time traffic.
package umc_pkg;

  localparam int unsigned ADDR_W     = 32;  // 4 GB
  localparam int unsigned LINE_OFF_W = 6;   // 64-byte lines
  localparam int unsigned COL_W      = 5;   // 32 lines per 2 KB row
  localparam int unsigned BANK_W     = 3;   // 8 banks per rank
  localparam int unsigned RANK_W     = 1;   // 2 ranks
  localparam int unsigned ROW_W      = ADDR_W - LINE_OFF_W - COL_W - BANK_W - RANK_W;  // 17
  localparam int unsigned N_RANKS    = 1 << RANK_W;
  localparam int unsigned N_BANKS_PER_RANK = 1 << BANK_W;
  localparam int unsigned NB         = N_RANKS * N_BANKS_PER_RANK;  // 16
  localparam int unsigned FB_W       = RANK_W + BANK_W;              // flat bank index width
  localparam int unsigned ID_W       = 8;   // requester tag

  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [ROW_W-1:0]  row_t;
  typedef logic [FB_W-1:0]   fbank_t;

  typedef enum logic [1:0] {
    SRC_LLC_MISS = 2'd0,   // read miss of the last-level cache
    SRC_LLC_WB   = 2'd1,   // dirty-line writeback of the last-level cache
    SRC_BYPASS   = 2'd2    // real-time request that bypasses the cache
  } src_e;

  // A request as it travels through the request buffers, fast lane and LLC.
  typedef struct packed {
    addr_t           addr;
    logic            we;      // 1: write, 0: read
    logic [ID_W-1:0] id;
  } mem_req_t;

  // A request as it sits in the transaction queue.
  typedef struct packed {
    addr_t           addr;
    logic            we;
    logic [ID_W-1:0] id;
    src_e            src;
    logic            fast;    // reached the cache through the fast lane
  } txn_t;

  typedef enum logic [2:0] {
    CMD_NOP = 3'd0,
    CMD_ACT = 3'd1,
    CMD_PRE = 3'd2,
    CMD_RD  = 3'd3,
    CMD_WR  = 3'd4
  } dram_cmd_e;

  // A DRAM command on the channel's command bus.
  typedef struct packed {
    dram_cmd_e             cmd;
    logic [RANK_W-1:0]     rank;
    logic [BANK_W-1:0]     bank;
    row_t                  row;
    logic [COL_W-1:0]      col;
    logic [ID_W-1:0]       id;
    src_e                  src;
  } dram_cmd_t;

  // Completion of a column command, returned to the requester.
  typedef struct packed {
    logic            we;
    logic [ID_W-1:0] id;
    src_e            src;
  } mem_resp_t;

  // Event counters of the controller (32-bit, wrapping).
  typedef struct packed {
    logic [31:0] act;          // ACT commands
    logic [31:0] pre;          // PRE commands
    logic [31:0] rd;           // RD commands
    logic [31:0] wr;           // WR commands
    logic [31:0] row_hit;      // column commands that needed no ACT
    logic [31:0] harvest;      // requests moved into the fast lane
    logic [31:0] llc_hit;      // cache lookups that hit
    logic [31:0] llc_miss;     // cache lookups that missed
    logic [31:0] fast_miss;    // cache misses of harvested requests
    logic [31:0] harvest_cyc;  // cycles the scheduler spent in harvesting mode
  } stats_t;

  function automatic row_t addr_row(addr_t a);
    return a[ADDR_W-1 -: ROW_W];
  endfunction

  function automatic fbank_t addr_fbank(addr_t a);
    return a[LINE_OFF_W+COL_W +: FB_W];   // {rank, bank}
  endfunction

  function automatic logic [COL_W-1:0] addr_col(addr_t a);
    return a[LINE_OFF_W +: COL_W];
  endfunction

endpackage
