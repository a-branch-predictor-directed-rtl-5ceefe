// lookahead_stage: branch lookahead, the first stage of the B-Fetch pipeline.
//
// Starting from a branch the main pipeline has fetched, it walks the
// predicted path one basic block per cycle:
//   1. the branch trace cache gives the branch that follows the current one
//      (current = PC, direction, target);
//   2. the branch predictor and target buffer of the main core give that
//      branch's direction and target, and the confidence estimator the
//      probability that the prediction is right;
//   3. the path confidence (product of the probabilities of all looked-ahead
//      branches the main fetch has not yet reached) times the new one is
//      compared with the threshold for the new depth. Below it the stage
//      stalls until fetch catches up and the product grows again; at the
//      maximum depth (12) it stalls too;
//   4. otherwise the new branch becomes current and its basic block (key and
//      BSN) is handed to the register lookup stage.
// Pre-lookahead (synchronisation with fetch): every branch fetched by the
// main pipeline advances the fetch BSN; when fetch has reached the lookahead
// (or no walk is under way) the walk restarts from the fetched branch. A flush
// restarts it from the corrected branch. On a trace cache miss the stage waits
// for fetch to reach it.
// What follows the document: the walk, the confidence product, per-depth
// thresholds, the depth limit 12 and the stall causes. This design's choices:
// the threshold values (the document gives only their trend, lower at small
// depths), depth = looked-ahead branches younger than the last fetched branch,
// and the restart rules.
//
// Timing: one block per cycle; the BTC, predictor and estimator answers are
// combinational inputs in the cycle the query is out. The output is a
// registered one-entry buffer (out_valid until out_ready), cleared by flush of
// an older branch or by retire past it.
module lookahead_stage
  import bfetch_pkg::*;
#(
  parameter int MAX_DEPTH = 12,
  parameter int FRAC_W    = 8,
  parameter logic [FRAC_W-1:0] THRESH [MAX_DEPTH] =
    '{8'd26, 8'd51, 8'd77, 8'd102, 8'd115, 8'd128, 8'd141, 8'd153, 8'd166, 8'd179, 8'd192, 8'd204}
) (
  input  logic              clk,
  input  logic              rst_n,
  // fetch stage of the main pipeline
  input  logic              fetch_valid,
  input  br_key_t           fetch_br,
  input  bsn_t              fetch_bsn,
  // flush from the main pipeline: corrected branch outcome
  input  logic              flush_valid,
  input  br_key_t           flush_br,
  input  bsn_t              flush_bsn,
  // retire from the main pipeline
  input  logic              retire_valid,
  input  bsn_t              retire_bsn,
  // branch trace cache read
  output br_key_t           btc_key,
  input  logic              btc_hit,
  input  xword_t            btc_next_pc,
  input  br_kind_t          btc_kind,
  // branch predictor / BTB query
  output xword_t            bp_pc,
  output br_kind_t          bp_kind,
  input  logic              bp_dir,
  input  xword_t            bp_target,
  // confidence of that prediction (from the estimator)
  input  logic [FRAC_W-1:0] br_conf,
  // to the register lookup stage
  output logic              out_valid,
  output br_key_t           out_key,
  output bsn_t              out_bsn,
  input  logic              out_ready,
  // status
  output la_state_t         state,
  output logic [FRAC_W-1:0] path_conf,
  output logic [$clog2(MAX_DEPTH+1)-1:0] depth
);

  localparam int RING = 1 << $clog2(MAX_DEPTH + 1);
  localparam int RW   = $clog2(RING);
  localparam int DW   = $clog2(MAX_DEPTH + 1);
  localparam logic [FRAC_W-1:0] ONE = '1;

  logic              cur_valid;
  br_key_t           cur;
  bsn_t              cur_bsn;
  logic              emit_cur;    // block of cur not yet handed on
  bsn_t              fbsn;        // last branch fetched by the main pipeline
  logic              fbsn_valid;
  logic [FRAC_W-1:0] ring [RING]; // confidence of each looked-ahead branch

  // ---------------- depth and path confidence
  bsn_t ahead;
  logic cur_ahead;                // cur is younger than the last fetched branch
  assign ahead     = cur_bsn - fbsn;
  assign cur_ahead = cur_valid && fbsn_valid && bsn_older(fbsn, cur_bsn);

  always_comb begin
    depth = '0;
    if (cur_ahead) depth = (ahead > bsn_t'(MAX_DEPTH)) ? DW'(MAX_DEPTH) : DW'(ahead);
  end

  always_comb begin
    logic [2*FRAC_W-1:0] prod;
    prod      = '0;
    path_conf = ONE;
    for (int k = 1; k <= MAX_DEPTH; k++) begin
      if (k <= int'(depth)) begin
        prod      = path_conf * ring[RW'(fbsn + bsn_t'(k))];
        path_conf = prod[2*FRAC_W-1 -: FRAC_W];
      end
    end
  end

  // ---------------- one lookahead step
  br_key_t           nxt;
  logic [2*FRAC_W-1:0] nprod;
  logic [FRAC_W-1:0] new_conf;
  logic              slot_free;
  logic              resync;     // restart from the fetched branch
  logic              step;       // advance to the next branch this cycle
  logic              do_emit_cur;

  assign btc_key = cur;
  assign bp_pc   = btc_next_pc;
  assign bp_kind = btc_kind;
  assign nxt     = '{pc: btc_next_pc, dir: bp_dir, target: bp_target};
  assign nprod   = path_conf * br_conf;
  assign new_conf = nprod[2*FRAC_W-1 -: FRAC_W];
  assign slot_free = !out_valid || out_ready;
  assign resync  = fetch_valid && (!cur_valid || !bsn_older(fetch_bsn, cur_bsn));

  always_comb begin
    state       = LA_IDLE;
    step        = 1'b0;
    do_emit_cur = 1'b0;
    if (!cur_valid) begin
      state = LA_IDLE;
    end else if (emit_cur) begin
      if (slot_free) begin
        do_emit_cur = 1'b1;
        state       = LA_RUN;
      end else begin
        state = LA_STALL_FULL;
      end
    end else if (int'(depth) >= MAX_DEPTH) begin
      state = LA_STALL_DEPTH;
    end else if (!btc_hit) begin
      state = LA_STALL_MISS;
    end else if (new_conf < THRESH[depth]) begin
      state = LA_STALL_CONF;
    end else if (!slot_free) begin
      state = LA_STALL_FULL;
    end else begin
      state = LA_RUN;
      step  = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur_valid  <= 1'b0;
      cur        <= '0;
      cur_bsn    <= '0;
      emit_cur   <= 1'b0;
      fbsn       <= '0;
      fbsn_valid <= 1'b0;
      out_valid  <= 1'b0;
      out_key    <= '0;
      out_bsn    <= '0;
      for (int i = 0; i < RING; i++) ring[i] <= ONE;
    end else if (flush_valid) begin
      // Misprediction: everything younger than the flushed branch is wrong.
      cur_valid  <= 1'b1;
      cur        <= flush_br;
      cur_bsn    <= flush_bsn;
      emit_cur   <= 1'b1;
      fbsn       <= flush_bsn;
      fbsn_valid <= 1'b1;
      if (out_valid && !bsn_older(out_bsn, flush_bsn)) out_valid <= 1'b0;
      else if (out_ready) out_valid <= 1'b0;
    end else begin
      if (out_ready) out_valid <= 1'b0;
      if (retire_valid && out_valid && bsn_older(out_bsn, retire_bsn)) out_valid <= 1'b0;
      if (fetch_valid) begin
        fbsn       <= fetch_bsn;
        fbsn_valid <= 1'b1;
      end
      if (resync) begin
        cur_valid <= 1'b1;
        cur       <= fetch_br;
        cur_bsn   <= fetch_bsn;
        emit_cur  <= !(cur_valid && cur_bsn == fetch_bsn && !emit_cur);
      end else if (do_emit_cur) begin
        emit_cur  <= 1'b0;
        out_valid <= 1'b1;
        out_key   <= cur;
        out_bsn   <= cur_bsn;
      end else if (step) begin
        cur       <= nxt;
        cur_bsn   <= cur_bsn + 1'b1;
        ring[RW'(cur_bsn + 1'b1)] <= br_conf;
        out_valid <= 1'b1;
        out_key   <= nxt;
        out_bsn   <= cur_bsn + 1'b1;
      end
    end
  end

endmodule
