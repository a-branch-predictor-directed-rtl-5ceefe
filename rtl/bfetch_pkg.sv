// bfetch_pkg: types and constants shared by the B-Fetch prefetcher blocks.
//
// B-Fetch walks the predicted control flow ahead of the fetch stage, one
// basic block per step, and for every block it expects to execute it issues
// data prefetches for the loads it saw in that block the last time. Every
// basic block is named by the branch that opens it: (branch PC, direction,
// target), the br_key_t below.
//
// Every entry that travels down the prefetch pipeline carries a branch
// sequence number (BSN): the sequence number the main pipeline gives to the
// branch opening the block. Flush (misprediction) removes entries younger
// than the flushed branch, retire removes entries older than the retiring
// branch. BSNs wrap, so age is compared by the sign of the difference; fewer
// than 2**(BSN_W-1) branches may be in flight. The BSN itself is this
// design's choice; the document only says which side of each deque flush and
// retire act on. Sizes follow the document (64-bit Alpha registers, 64-byte
// lines, 4 MHT units with 4-bit line patterns).
package bfetch_pkg;

  parameter int XLEN      = 64;  // register / address width (Alpha)
  parameter int LINE_OFF  = 6;   // log2 of the 64-byte cache line
  parameter int NUM_UNITS = 4;   // MHT units per entry
  parameter int PATT_W    = 4;   // negPatt / posPatt bits
  parameter int REG_W     = 5;   // architectural register index
  parameter int DISP_W    = 16;  // load displacement
  parameter int BSN_W     = 12;  // branch sequence number
  parameter int MHT_IDX_W = 7;   // log2 of the 128 MHT entries

  typedef logic [XLEN-1:0]           xword_t;
  typedef logic [BSN_W-1:0]          bsn_t;
  typedef logic [REG_W-1:0]          regidx_t;
  typedef logic signed [DISP_W-1:0]  disp_t;
  typedef logic [PATT_W-1:0]         patt_t;
  typedef logic [$clog2(NUM_UNITS)-1:0] unit_idx_t;

  // Identity of a branch outcome = identity of the basic block it opens.
  typedef struct packed {
    xword_t pc;
    logic   dir;     // 1 = taken
    xword_t target;  // first instruction of the following block
  } br_key_t;

  typedef struct packed {
    logic is_call;
    logic is_ret;
    logic is_uncond;
  } br_kind_t;

  // One MHT unit: one base register of a basic block and the loads off it.
  typedef struct packed {
    logic    reg_valid;
    regidx_t reg_idx;
    xword_t  com_reg_val;  // base register value at the last commit
    disp_t   reg_disp;     // displacement of the first load off reg_idx
    patt_t   neg_patt;     // bit k: a load k+1 lines below the first one
    patt_t   pos_patt;     // bit k: a load k+1 lines above the first one
    xword_t  gen_reg_val;  // ERF value used by the last prefetch
    logic    gen_valid;
    xword_t  gen_offset;   // commit value - ERF value, added in offset mode
    xword_t  delta;        // change of the commit value between two commits
    xword_t  skid;         // change of delta
    logic    loop_valid;
  } mht_unit_t;

  // What the register lookup stage hands to the generate deque per unit.
  typedef struct packed {
    logic    valid;
    regidx_t reg_idx;
    disp_t   disp;
    patt_t   neg_patt;
    patt_t   pos_patt;
    xword_t  gen_offset;
    logic    loop_valid;
    xword_t  delta;
    xword_t  skid;
  } gen_unit_t;

  // A basic block entry leaving the register lookup stage.
  typedef struct packed {
    bsn_t      bsn;
    br_key_t   key;
    logic [MHT_IDX_W-1:0] mht_idx;  // MHT entry the units came from (for genRegVal)
    gen_unit_t [NUM_UNITS-1:0] units;
  } block_entry_t;

  // A block handed from the generate deque to the calculate buffer.
  typedef struct packed {
    block_entry_t               blk;
    xword_t [NUM_UNITS-1:0]     run_addr;  // loop mode running address
    logic   [NUM_UNITS-1:0]     loop_fwd;  // run_addr was forwarded: loop mode
  } calc_job_t;

  // What the lookahead stage is doing (also the reason it is stalled).
  typedef enum logic [2:0] {
    LA_IDLE,         // no branch to start from yet
    LA_RUN,          // emitted a block this cycle
    LA_STALL_CONF,   // path confidence below the threshold of the next depth
    LA_STALL_DEPTH,  // maximum lookahead depth reached
    LA_STALL_MISS,   // branch trace cache miss: waits for fetch
    LA_STALL_FULL    // next stage cannot take a block
  } la_state_t;

  // True when BSN a is strictly older than BSN b.
  function automatic logic bsn_older(bsn_t a, bsn_t b);
    bsn_t d;
    d = b - a;
    return (d != '0) && !d[BSN_W-1];
  endfunction

  // Cache-line address of a byte address.
  function automatic xword_t line_of(xword_t a);
    return {a[XLEN-1:LINE_OFF], {LINE_OFF{1'b0}}};
  endfunction

endpackage
