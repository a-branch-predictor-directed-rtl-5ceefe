// bfetch_top: B-Fetch, a branch-predictor-directed data cache prefetcher for
// an out-of-order core.
//
// An auxiliary four-stage pipeline runs beside the core:
//   1. branch lookahead  - lookahead_stage walks the predicted path one basic
//      block per cycle using the branch trace cache, the core's branch
//      predictor (ports bp_*) and the confidence estimator; it stalls on low
//      path confidence, at depth 12, on a trace cache miss or back-pressure;
//   2. register lookup   - the memory history table (MHT) entry of the block
//      is read into the lookup buffer; a miss (block without loads) ends there;
//   3. mode generate     - the generate deque holds the in-flight blocks and
//      forwards loop-mode running addresses (front pull / back push);
//   4. prefetch calculate - the calculate buffer turns one block at a time
//      into line addresses (execution register file + displacement +
//      genOffset, or the loop running address, plus the neg/pos pattern
//      lines), one per cycle, into the prefetch deque, which issues them to
//      the L1D while at most 7 prefetch MSHRs are in use.
// Commit side: every committed instruction (cm_*) updates the last committed
// branch buffer, which writes branch trace cache links, and the MHT through
// the unit allocation table. A committed branch is also the retire signal
// (retire_bsn = cm_bsn): blocks older than it leave the deques and buffers.
// A flush (flush_*) removes every block with BSN >= flush_bsn everywhere and
// restarts the lookahead from the corrected branch.
// The structure follows the document; stage buffers of one entry and the BSN
// used for filtering are this design's choices.
//
// Timing: all state changes on the rising clk edge; rst_n is an asynchronous
// active-low reset. Predictor answers (bp_dir, bp_target, bp_lhist ...) must
// be combinational replies to bp_pc in the same cycle.
module bfetch_top
  import bfetch_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  // fetch stage (pre-lookahead synchronisation)
  input  logic      fetch_valid,
  input  br_key_t   fetch_br,
  input  bsn_t      fetch_bsn,
  // flush (misprediction / decode redirect)
  input  logic      flush_valid,
  input  br_key_t   flush_br,
  input  bsn_t      flush_bsn,
  // commit stream, one instruction per cycle
  input  logic      cm_valid,
  input  logic      cm_is_branch,
  input  br_key_t   cm_br,
  input  br_kind_t  cm_kind,
  input  bsn_t      cm_bsn,
  input  logic      cm_is_load,
  input  regidx_t   cm_base_idx,
  input  disp_t     cm_disp,
  input  xword_t    cm_base_val,
  input  logic      cm_wr_en,
  input  regidx_t   cm_wr_idx,
  // integer writeback of the execution core
  input  logic      wb_valid,
  input  regidx_t   wb_idx,
  input  xword_t    wb_data,
  // branch predictor / BTB query from the lookahead stage
  output xword_t    bp_pc,
  output br_kind_t  bp_kind,
  input  logic      bp_dir,
  input  xword_t    bp_target,
  input  logic [9:0]  bp_lhist,
  input  logic [11:0] bp_ghist,
  input  logic [1:0]  bp_self_l,
  input  logic [1:0]  bp_self_g,
  // branch resolution (confidence estimator training)
  input  logic      rs_valid,
  input  logic [9:0]  rs_lhist,
  input  logic [11:0] rs_ghist,
  input  logic [1:0]  rs_self_l,
  input  logic [1:0]  rs_self_g,
  input  logic      rs_correct,
  // prefetch requests to the L1 data cache
  output logic      pf_req_valid,
  output xword_t    pf_req_addr,
  input  logic      pf_req_ready,
  input  logic      pf_fill,
  // status and events (one-cycle pulses)
  output la_state_t la_state,
  output logic [3:0] la_depth,
  output logic [7:0] la_path_conf,
  output logic [6:0] gd_count,
  output logic [6:0] pd_count,
  output logic [2:0] pf_mshr_used,
  output logic      ev_mht_hit,
  output logic      ev_mht_miss,
  output logic      ev_front_pull,
  output logic      ev_back_push,
  output logic      ev_loop_addr,
  output logic      ev_offset_addr,
  output logic      ev_patt_addr,
  output logic      ev_flush_drop,
  output logic      ev_retire_drop,
  output logic      ev_mshr_block,
  output logic      ev_unit_overflow,
  output logic [5:0] conf_number,     // confidence number of the queried branch
  output logic      conf_refresh,     // estimator is recomputing bucket ratios
  output logic      gd_full,
  output logic      calc_busy
);

  localparam int GD_DEPTH = 64;
  localparam int SW       = $clog2(GD_DEPTH);

  logic retire_valid;
  bsn_t retire_bsn;
  assign retire_valid = cm_valid && cm_is_branch;
  assign retire_bsn   = cm_bsn;

  // ---------------- commit side: LCB -> BTC, MHT
  logic     link_valid, cur_block_valid;
  br_key_t  link_from, cur_block;
  xword_t   link_to_pc;
  br_kind_t link_to_kind;

  last_committed_branch u_lcb (
    .clk, .rst_n,
    .commit_br_valid(cm_valid && cm_is_branch),
    .commit_br(cm_br), .commit_kind(cm_kind),
    .link_valid, .link_from, .link_to_pc, .link_to_kind,
    .cur_block_valid, .cur_block
  );

  br_key_t  btc_key;
  logic     btc_hit;
  xword_t   btc_next_pc;
  br_kind_t btc_kind;

  branch_trace_cache #(.ENTRIES(256), .TAG_W(9)) u_btc (
    .clk, .rst_n,
    .wr_en(link_valid), .wr_key(link_from), .wr_next_pc(link_to_pc), .wr_kind(link_to_kind),
    .rd_key(btc_key), .rd_hit(btc_hit), .rd_next_pc(btc_next_pc), .rd_kind(btc_kind)
  );

  // ---------------- confidence
  logic [7:0] br_conf;

  branch_confidence_estimator u_conf (
    .clk, .rst_n,
    .lk_lhist(bp_lhist), .lk_ghist(bp_ghist), .lk_self_l(bp_self_l), .lk_self_g(bp_self_g),
    .lk_conf(br_conf), .lk_cnum(conf_number),
    .up_valid(rs_valid), .up_lhist(rs_lhist), .up_ghist(rs_ghist),
    .up_self_l(rs_self_l), .up_self_g(rs_self_g), .up_correct(rs_correct),
    .refresh_busy(conf_refresh)
  );

  // ---------------- stage 1: branch lookahead
  logic    la_valid, la_ready;
  br_key_t la_key;
  bsn_t    la_bsn;

  lookahead_stage #(.MAX_DEPTH(12), .FRAC_W(8)) u_la (
    .clk, .rst_n,
    .fetch_valid, .fetch_br, .fetch_bsn,
    .flush_valid, .flush_br, .flush_bsn,
    .retire_valid, .retire_bsn,
    .btc_key, .btc_hit, .btc_next_pc, .btc_kind,
    .bp_pc, .bp_kind, .bp_dir, .bp_target,
    .br_conf,
    .out_valid(la_valid), .out_key(la_key), .out_bsn(la_bsn), .out_ready(la_ready),
    .state(la_state), .path_conf(la_path_conf), .depth(la_depth)
  );

  // ---------------- stage 2: register lookup (MHT) into the lookup buffer
  logic                       mht_hit;
  logic [MHT_IDX_W-1:0]       mht_idx;
  gen_unit_t [NUM_UNITS-1:0]  mht_units;
  logic                       gw_valid;
  logic [MHT_IDX_W-1:0]       gw_idx;
  unit_idx_t                  gw_unit;
  xword_t                     gw_val;

  memory_history_table #(.ENTRIES(128), .TAG_W(8)) u_mht (
    .clk, .rst_n,
    .cm_valid, .cm_is_branch, .cm_is_load, .cm_base_idx, .cm_disp, .cm_base_val,
    .cm_wr_en, .cm_wr_idx, .cur_block_valid, .cur_block,
    .lk_key(la_key), .lk_hit(mht_hit), .lk_idx(mht_idx), .lk_units(mht_units),
    .gw_valid, .gw_idx, .gw_unit, .gw_val,
    .cm_unit_overflow(ev_unit_overflow)
  );

  logic         lu_valid;
  block_entry_t lu_blk;
  logic         gd_in_ready;

  assign la_ready    = !flush_valid && (!lu_valid || gd_in_ready);
  assign ev_mht_hit  = la_valid && la_ready && mht_hit;
  assign ev_mht_miss = la_valid && la_ready && !mht_hit;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lu_valid <= 1'b0;
      lu_blk   <= '0;
    end else if (flush_valid) begin
      if (lu_valid && !bsn_older(lu_blk.bsn, flush_bsn)) lu_valid <= 1'b0;
    end else begin
      if (lu_valid && gd_in_ready) lu_valid <= 1'b0;
      if (retire_valid && lu_valid && bsn_older(lu_blk.bsn, retire_bsn)) lu_valid <= 1'b0;
      if (la_valid && la_ready && mht_hit) begin
        lu_valid       <= 1'b1;
        lu_blk.bsn     <= la_bsn;
        lu_blk.key     <= la_key;
        lu_blk.mht_idx <= mht_idx;
        lu_blk.units   <= mht_units;
      end
    end
  end

  // ---------------- stage 3: generate deque
  logic                   job_valid, job_take;
  calc_job_t              job;
  logic [SW-1:0]          job_slot;
  logic                   done_valid;
  logic [SW-1:0]          done_slot;
  bsn_t                   done_bsn;
  xword_t [NUM_UNITS-1:0] done_addr;
  logic [NUM_UNITS-1:0]   done_addr_valid;

  generate_deque #(.DEPTH(GD_DEPTH)) u_gd (
    .clk, .rst_n,
    .in_valid(lu_valid), .in_blk(lu_blk), .in_ready(gd_in_ready),
    .job_valid, .job, .job_slot, .job_take,
    .done_valid, .done_slot, .done_bsn, .done_addr, .done_addr_valid,
    .flush_valid, .flush_bsn, .retire_valid, .retire_bsn,
    .count(gd_count), .full(gd_full),
    .ev_front_pull, .ev_back_push
  );

  // ---------------- stage 4: prefetch calculate
  regidx_t erf_idx;
  xword_t  erf_val;
  logic    pfc_valid, pfc_ready;
  xword_t  pfc_addr;
  bsn_t    pfc_bsn;

  execution_register_file #(.NREGS(32)) u_erf (
    .clk, .rst_n,
    .wr_en(wb_valid), .wr_idx(wb_idx), .wr_data(wb_data),
    .rd_idx(erf_idx), .rd_data(erf_val)
  );

  prefetch_calculate #(.GD_DEPTH(GD_DEPTH)) u_calc (
    .clk, .rst_n,
    .job_valid, .job, .job_slot, .job_take,
    .done_valid, .done_slot, .done_bsn, .done_addr, .done_addr_valid,
    .erf_idx, .erf_val,
    .gw_valid, .gw_idx, .gw_unit, .gw_val,
    .pf_valid(pfc_valid), .pf_addr(pfc_addr), .pf_bsn(pfc_bsn), .pf_ready(pfc_ready),
    .flush_valid, .flush_bsn, .retire_valid, .retire_bsn,
    .busy(calc_busy),
    .ev_loop_addr, .ev_offset_addr, .ev_patt_addr
  );

  // ---------------- prefetch deque and issue
  prefetch_deque #(.DEPTH(100), .PF_MSHR_MAX(7)) u_pd (
    .clk, .rst_n,
    .in_valid(pfc_valid), .in_addr(pfc_addr), .in_bsn(pfc_bsn), .in_ready(pfc_ready),
    .out_valid(pf_req_valid), .out_addr(pf_req_addr), .out_ready(pf_req_ready),
    .fill(pf_fill),
    .flush_valid, .flush_bsn, .retire_valid, .retire_bsn,
    .count(pd_count), .mshr_used(pf_mshr_used),
    .ev_mshr_block, .ev_flush_drop, .ev_retire_drop
  );

endmodule
