// generate_deque: in-flight basic blocks between MHT lookup and prefetch
// calculation, with loop-mode address forwarding.
//
// Entries (one per looked-ahead basic block, holding the MHT units read for
// it) are kept in BSN order in a circular buffer: pushed at the head (young
// side) by the register lookup stage, handed to the calculate stage oldest
// first, and kept after calculation as loop history until retired.
//
// Loop forwarding works per unit. A unit whose MHT loop_valid is set takes the
// running address of the previous instance of the same block (same opening
// branch, direction and target) plus delta + skid, and is marked loop_fwd; the
// calculate stage then prefetches that address instead of the offset-mode
// one. Two paths provide it:
//   front pull - when a block is pushed, the youngest resident instance that
//                has been calculated or whose branch has committed, and has a
//                running address for the unit, supplies it;
//   back push  - when the calculate stage finishes a block it writes the
//                block's addresses back as running addresses and forwards them
//                to the nearest younger instance not yet taken for
//                calculation. Back push wins over an older front pull value.
// Filtering: flush of branch f removes every entry with BSN >= f (head side);
// retire of branch r removes entries with BSN < r (tail side, their blocks
// have fully retired) and marks the entry with BSN r committed.
// The structure, both forwarding paths and both filters follow the document;
// the BSN, the exact retire rule and forwarding "+ delta + skid" are this
// design's reading. DEPTH 64 follows the document.
//
// Timing: push when in_valid && in_ready (no push during a flush). The oldest
// uncalculated entry is offered combinationally on job_*; job_take moves it
// into the calculate buffer. done_* (from the calculate stage) takes effect at
// the clock edge. Front pull is resolved in the push cycle.
module generate_deque
  import bfetch_pkg::*;
#(
  parameter int DEPTH = 64
) (
  input  logic         clk,
  input  logic         rst_n,
  // push from the register lookup stage
  input  logic         in_valid,
  input  block_entry_t in_blk,
  output logic         in_ready,
  // to the calculate stage
  output logic         job_valid,
  output calc_job_t    job,
  output logic [$clog2(DEPTH)-1:0] job_slot,
  input  logic         job_take,
  // calculate stage finished a block
  input  logic         done_valid,
  input  logic [$clog2(DEPTH)-1:0] done_slot,
  input  bsn_t         done_bsn,
  input  xword_t [NUM_UNITS-1:0] done_addr,
  input  logic [NUM_UNITS-1:0]   done_addr_valid,
  // main pipeline filters
  input  logic         flush_valid,
  input  bsn_t         flush_bsn,
  input  logic         retire_valid,
  input  bsn_t         retire_bsn,
  // status
  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic         full,
  output logic         ev_front_pull,
  output logic         ev_back_push
);

  localparam int PW = $clog2(DEPTH);

  typedef struct packed {
    block_entry_t           blk;
    xword_t [NUM_UNITS-1:0] run_addr;
    logic [NUM_UNITS-1:0]   run_valid;
    logic [NUM_UNITS-1:0]   loop_fwd;
    logic                   calculated;
    logic                   in_calc;
    logic                   committed;
  } gd_entry_t;

  gd_entry_t        q [DEPTH];
  logic [PW-1:0]    tail;           // oldest
  logic [PW:0]      cnt;

  // slot s is resident when its distance from the tail is below the count
  function automatic logic [PW-1:0] pos_of(logic [PW-1:0] s, logic [PW-1:0] t);
    return s - t;
  endfunction

  logic [DEPTH-1:0] resident;
  always_comb begin
    for (int s = 0; s < DEPTH; s++)
      resident[s] = ({1'b0, pos_of(PW'(s), tail)} < cnt);
  end

  assign count    = cnt;
  assign full     = (cnt == (PW+1)'(DEPTH));
  assign in_ready = !full && !flush_valid;

  logic [PW-1:0] head;
  assign head = tail + cnt[PW-1:0];

  function automatic logic same_block(block_entry_t a, block_entry_t b);
    return a.key == b.key;
  endfunction

  // ---------------- oldest entry still to calculate
  always_comb begin
    logic [PW-1:0] s;
    job_valid = 1'b0;
    job_slot  = '0;
    for (int i = DEPTH - 1; i >= 0; i--) begin
      s = tail + PW'(i);
      if ((PW+1)'(i) < cnt && !q[s].calculated && !q[s].in_calc) begin
        job_valid = 1'b1;
        job_slot  = s;
      end
    end
    job.blk      = q[job_slot].blk;
    job.run_addr = q[job_slot].run_addr;
    job.loop_fwd = q[job_slot].loop_fwd;
  end

  // ---------------- front pull: youngest usable resident instance
  logic          fp_found;
  logic [PW-1:0] fp_slot;
  always_comb begin
    logic [PW-1:0] s;
    fp_found = 1'b0;
    fp_slot  = '0;
    for (int i = 0; i < DEPTH; i++) begin
      s = tail + PW'(i);
      if ((PW+1)'(i) < cnt && same_block(q[s].blk, in_blk) &&
          (q[s].calculated || q[s].committed) && (q[s].run_valid != '0)) begin
        fp_found = 1'b1;
        fp_slot  = s;
      end
    end
  end

  gd_entry_t new_e;
  always_comb begin
    new_e           = '0;
    new_e.blk       = in_blk;
    ev_front_pull   = 1'b0;
    if (fp_found) begin
      for (int u = 0; u < NUM_UNITS; u++) begin
        if (in_blk.units[u].valid && in_blk.units[u].loop_valid &&
            q[fp_slot].blk.units[u].loop_valid && q[fp_slot].run_valid[u]) begin
          new_e.run_addr[u]  = q[fp_slot].run_addr[u] + in_blk.units[u].delta + in_blk.units[u].skid;
          new_e.run_valid[u] = 1'b1;
          new_e.loop_fwd[u]  = 1'b1;
          ev_front_pull      = in_valid && in_ready;
        end
      end
    end
  end

  // ---------------- back push: nearest younger instance not yet taken
  logic          done_ok;
  logic          bp_found;
  logic [PW-1:0] bp_slot;
  assign done_ok = done_valid && resident[done_slot] && q[done_slot].blk.bsn == done_bsn;

  always_comb begin
    logic [PW-1:0] s;
    bp_found = 1'b0;
    bp_slot  = '0;
    for (int i = DEPTH - 1; i >= 0; i--) begin
      s = tail + PW'(i);
      if ((PW+1)'(i) < cnt && pos_of(s, tail) > pos_of(done_slot, tail) &&
          same_block(q[s].blk, q[done_slot].blk) && !q[s].calculated && !q[s].in_calc) begin
        bp_found = 1'b1;
        bp_slot  = s;
      end
    end
  end

  logic [NUM_UNITS-1:0] bp_units;
  always_comb begin
    for (int u = 0; u < NUM_UNITS; u++)
      bp_units[u] = done_ok && bp_found && done_addr_valid[u] &&
                    q[done_slot].blk.units[u].loop_valid &&
                    q[bp_slot].blk.units[u].valid && q[bp_slot].blk.units[u].loop_valid;
    ev_back_push = (bp_units != '0);
  end

  // ---------------- filters
  logic [PW:0] keep_flush;   // entries older than the flushed branch
  logic [PW:0] drop_retire;  // entries older than the retiring branch
  always_comb begin
    logic [PW-1:0] s;
    keep_flush  = '0;
    drop_retire = '0;
    for (int i = 0; i < DEPTH; i++) begin
      s = tail + PW'(i);
      if ((PW+1)'(i) < cnt) begin
        if (bsn_older(q[s].blk.bsn, flush_bsn))  keep_flush  = keep_flush + 1'b1;
        if (bsn_older(q[s].blk.bsn, retire_bsn)) drop_retire = drop_retire + 1'b1;
      end
    end
  end

  logic push;
  assign push = in_valid && in_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tail <= '0;
      cnt  <= '0;
    end else if (flush_valid) begin
      cnt <= keep_flush;
    end else begin
      if (retire_valid) begin
        tail <= tail + drop_retire[PW-1:0];
        cnt  <= cnt - drop_retire + (PW+1)'(push);
      end else begin
        cnt  <= cnt + (PW+1)'(push);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (push) q[head] <= new_e;
    if (job_valid && job_take) q[job_slot].in_calc <= 1'b1;
    if (done_ok) begin
      q[done_slot].calculated <= 1'b1;
      q[done_slot].in_calc    <= 1'b0;
      for (int u = 0; u < NUM_UNITS; u++) begin
        if (done_addr_valid[u]) begin
          q[done_slot].run_addr[u]  <= done_addr[u];
          q[done_slot].run_valid[u] <= 1'b1;
        end
        if (bp_units[u]) begin
          q[bp_slot].run_addr[u]  <= done_addr[u] + q[bp_slot].blk.units[u].delta +
                                     q[bp_slot].blk.units[u].skid;
          q[bp_slot].run_valid[u] <= 1'b1;
          q[bp_slot].loop_fwd[u]  <= 1'b1;
        end
      end
    end
    if (retire_valid && !flush_valid) begin
      for (int s = 0; s < DEPTH; s++)
        if (resident[s] && q[s].blk.bsn == retire_bsn) q[s].committed <= 1'b1;
    end
  end

endmodule
