// pcm_pkg: types and constants shared by the non-blocking PCM rank controller.
//
// A rank is 8 lock-stepped chips; each chip has 8 banks of 32 MB, and every
// bank is an 8 x 8 grid of 4 Mb cell arrays (array rows x array columns).
// Array columns 0-3 form the left half bank and 4-7 the right half. One array
// row of one array holds 2048 bits per chip, i.e. 2 KB across the rank: eight
// 256 B row-buffer entries (address field seg) of four 64 B lines each. A line
// is written in up to 8 rounds; its eight 64-bit parts (SEG_BITS) are called
// segments, one per round in the 8-round setting.
//
// Timing constants are in controller clock cycles. The controller clock is
// taken as the 400 MHz clock of a DDR2-800 channel (2.5 ns per cycle); the
// nanosecond figures (50 ns read miss, 10 ns read hit, 200 ns write set-up,
// 100 ns per write round, 100 ns configuration penalty) follow the document,
// the clock rate is this design's choice.
package pcm_pkg;

  // ---- organisation -------------------------------------------------------
  localparam int NUM_BANKS      = 8;     // banks per chip (= per rank)
  localparam int NUM_THREADS    = 4;     // one thread per core, 4 cores
  localparam int ARR_ROWS       = 8;     // H lines per bank
  localparam int ARR_COLS       = 8;     // V lines per bank, 4 per half
  localparam int NUM_ARRAYS     = ARR_ROWS * ARR_COLS;  // 64 arrays per bank
  localparam int ROWS_PER_ARRAY = 2048;  // local wordlines per array
  localparam int LINE_BITS      = 512;   // one 64 B request
  localparam int SEG_BITS       = 64;    // one round of the 8-round setting
  localparam int NUM_SEGS       = LINE_BITS / SEG_BITS;  // 8
  localparam int NUM_CFGS       = 4;     // 8-, 4-, 2- and 1-round settings
  localparam int RB_ENTRIES     = 8;     // row buffer entries per bank

  // ---- timing (cycles of 2.5 ns) -------------------------------------------
  localparam int T_RD_MISS  = 20;   // 50 ns
  localparam int T_RD_HIT   = 4;    // 10 ns
  localparam int T_WR_SETUP = 80;   // 200 ns fixed part of a write
  localparam int T_ROUND    = 40;   // 100 ns per write round
  localparam int T_BPB      = 40;   // 100 ns configuration penalty per write
  localparam int FILL_READS = 4;    // 64 B reads needed to fill a 256 B entry

  // ---- power budgeting -------------------------------------------------------
  localparam int POWER_BUDGET = 1024;  // concurrent bit writes (100 %)
  localparam int DEMAND_CAP   = 64;    // cap on the demand BPB may pick

  localparam int TID_W   = $clog2(NUM_THREADS);
  localparam int BANK_W  = $clog2(NUM_BANKS);
  localparam int ROW_W   = $clog2(ROWS_PER_ARRAY);
  localparam int DEM_W   = 11;      // 0 .. 1024
  localparam int SEGC_W  = 7;       // 0 .. 65 changed bits in one segment
  localparam int ID_W    = 8;

  // Address of one 64 B line inside the rank.
  typedef struct packed {
    logic [BANK_W-1:0] bank;
    logic [2:0]        arr_row;   // selects the H line
    logic [2:0]        arr_col;   // selects the V line; bit 2 = half
    logic [ROW_W-1:0]  row;       // local wordline inside the array
    logic [2:0]        seg;       // 256 B row-buffer segment of the row
    logic [1:0]        line;      // 64 B line inside the segment
  } pcm_addr_t;

  typedef struct packed {
    logic [ID_W-1:0]      id;
    logic [TID_W-1:0]     tid;
    logic                 we;
    pcm_addr_t            addr;
    logic [LINE_BITS-1:0] wdata;
  } pcm_req_t;

  typedef struct packed {
    logic [ID_W-1:0]      id;
    logic [TID_W-1:0]     tid;
    logic [LINE_BITS-1:0] data;
  } pcm_resp_t;

  // What the cells of one line hold: the (possibly inverted) data and one
  // Flip-N-Write flag per 64-bit segment.
  typedef struct packed {
    logic [NUM_SEGS-1:0]  flip;
    logic [LINE_BITS-1:0] data;
  } cell_word_t;

  // Result of bit-level power budgeting for one write.
  typedef struct packed {
    logic [1:0]       cfg;       // 0: 8 rounds, 1: 4, 2: 2, 3: 1 round
    logic [DEM_W-1:0] demand;    // concurrent bit writes of the worst round
    logic [3:0]       nrounds;   // rounds that carry bit changes
  } wr_cfg_t;

  // One-cycle event flags of a bank, for performance counting.
  typedef struct packed {
    logic grp_formed;   // an issue group was formed by the reordering step
    logic fallback;     // the group is the single PAR-BS pick
    logic iss_rd_hit;   // a read row hit left the bank queue
    logic iss_rd_miss;
    logic iss_wr_hit;
    logic iss_wr_miss;
    logic rd_insert;    // a read was inserted into a paused write
    logic ww_par;       // both halves are writing
    logic rw_par;       // a read runs while a write runs
    logic rr_par;       // both halves are reading
    logic dec_stall;    // the queue head waits for the shared decoders
    logic col_stall;    // the queue head waits for a busy array column or slot
    logic round_skip;   // a write skips rounds without bit changes
  } bank_ev_t;

  typedef enum logic { SCHED_RAWP = 1'b0, SCHED_AWP = 1'b1 } sched_e;

  function automatic logic half_of(pcm_addr_t a);
    return a.arr_col[2];
  endfunction

  // Row-buffer tag: the 256 B segment of one array row.
  localparam int TAG_W = 3 + 3 + ROW_W + 3;
  function automatic logic [TAG_W-1:0] tag_of(pcm_addr_t a);
    return {a.arr_row, a.arr_col, a.row, a.seg};
  endfunction

endpackage
