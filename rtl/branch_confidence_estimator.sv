// branch_confidence_estimator: probability that a branch prediction is right.
//
// Composite estimator in the style of the JRS and self-counter estimators:
//   * a 1024 x 5-bit table indexed by the branch's local history: +1
//     (saturating) on a correct prediction, halved on a misprediction, so it
//     reacts more to mispredictions than to correct predictions;
//   * a 4096 x 3-bit table indexed by the global history: +1 (saturating) on
//     a correct prediction, reset to 0 on a misprediction;
//   * the tournament predictor's own 2-bit local and global counters, given
//     as inputs ("self counters", in strength form 0..3).
// Their sum, the confidence number 0..44, selects a bucket. Each bucket counts
// resolved predictions and correct ones; every INTERVAL resolved branches a
// sequential divider walks all buckets, stores correct/total as an unsigned
// fraction with FRAC_W bits (255 ~ 1.0) and halves both counts (ageing, this
// design's choice). The lookahead stage multiplies these fractions along the
// path. Table sizes and update rules follow the document; the bucket ageing,
// the interval and the fixed-point format are this design's choices. A bucket
// with no history reports the maximum fraction.
//
// Timing: lookup is combinational (lk_conf in the cycle of lk_*). Updates act
// at the clock edge. A ratio refresh takes NBUCKETS*(FRAC_W+1) cycles and runs
// alongside updates. Reset clears tables and counts.
module branch_confidence_estimator
  import bfetch_pkg::*;
#(
  parameter int LHIST_W  = 10,
  parameter int GHIST_W  = 12,
  parameter int LCONF_W  = 5,
  parameter int GCONF_W  = 3,
  parameter int NBUCKETS = 45,
  parameter int FRAC_W   = 8,
  parameter int CNT_W    = 16,
  parameter int INTERVAL = 1024
) (
  input  logic               clk,
  input  logic               rst_n,
  // lookup (lookahead stage)
  input  logic [LHIST_W-1:0] lk_lhist,
  input  logic [GHIST_W-1:0] lk_ghist,
  input  logic [1:0]         lk_self_l,
  input  logic [1:0]         lk_self_g,
  output logic [FRAC_W-1:0]  lk_conf,
  output logic [5:0]         lk_cnum,
  // update (branch resolved in the main pipeline)
  input  logic               up_valid,
  input  logic [LHIST_W-1:0] up_lhist,
  input  logic [GHIST_W-1:0] up_ghist,
  input  logic [1:0]         up_self_l,
  input  logic [1:0]         up_self_g,
  input  logic               up_correct,
  output logic               refresh_busy
);

  localparam int LSZ  = 1 << LHIST_W;
  localparam int GSZ  = 1 << GHIST_W;
  localparam int BW   = $clog2(NBUCKETS);
  localparam int IVW  = $clog2(INTERVAL + 1);
  localparam logic [LCONF_W-1:0] LMAX = '1;
  localparam logic [GCONF_W-1:0] GMAX = '1;

  logic [LCONF_W-1:0] ltab [LSZ];
  logic [GCONF_W-1:0] gtab [GSZ];
  logic [CNT_W-1:0]   b_correct [NBUCKETS];
  logic [CNT_W-1:0]   b_total   [NBUCKETS];
  logic [FRAC_W-1:0]  b_frac    [NBUCKETS];

  function automatic logic [5:0] cnum_of(logic [LCONF_W-1:0] l, logic [GCONF_W-1:0] g,
                                         logic [1:0] sl, logic [1:0] sg);
    return 6'(l) + 6'(g) + 6'(sl) + 6'(sg);
  endfunction

  // ---------------- lookup
  always_comb begin
    lk_cnum = cnum_of(ltab[lk_lhist], gtab[lk_ghist], lk_self_l, lk_self_g);
    lk_conf = b_frac[BW'(lk_cnum)];
  end

  // ---------------- update
  logic [LCONF_W-1:0] up_l;
  logic [GCONF_W-1:0] up_g;
  logic [5:0]         up_cnum;
  logic [BW-1:0]      up_b;
  assign up_l    = ltab[up_lhist];
  assign up_g    = gtab[up_ghist];
  assign up_cnum = cnum_of(up_l, up_g, up_self_l, up_self_g);
  assign up_b    = BW'(up_cnum);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LSZ; i++) ltab[i] <= '0;
      for (int i = 0; i < GSZ; i++) gtab[i] <= '0;
    end else if (up_valid) begin
      if (up_correct) begin
        if (up_l != LMAX) ltab[up_lhist] <= up_l + 1'b1;
        if (up_g != GMAX) gtab[up_ghist] <= up_g + 1'b1;
      end else begin
        ltab[up_lhist] <= up_l >> 1;
        gtab[up_ghist] <= '0;
      end
    end
  end

  // ---------------- periodic ratio refresh (restoring divider)
  typedef enum logic [1:0] {R_IDLE, R_LOAD, R_DIV} rstate_t;
  rstate_t           rstate;
  logic [IVW-1:0]    since;     // resolved branches since the last refresh
  logic [BW-1:0]     rb;        // bucket being refreshed
  logic [$clog2(FRAC_W+1)-1:0] rbit;
  logic [CNT_W:0]    rem;
  logic [CNT_W-1:0]  div;
  logic [FRAC_W-1:0] quo;
  logic              rb_done;   // last cycle of bucket rb: write and age it
  logic              rb_full;   // correct == total (ratio 1.0)

  assign refresh_busy = (rstate != R_IDLE);
  assign rb_done      = (rstate == R_DIV) && (rbit == 0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rstate  <= R_IDLE;
      since   <= '0;
      rb      <= '0;
      rbit    <= '0;
      rem     <= '0;
      div     <= '0;
      quo     <= '0;
      rb_full <= 1'b0;
    end else begin
      if (up_valid) since <= (since == IVW'(INTERVAL - 1)) ? '0 : since + 1'b1;
      unique case (rstate)
        R_IDLE: if (up_valid && since == IVW'(INTERVAL - 1)) begin
          rstate <= R_LOAD;
          rb     <= '0;
        end
        R_LOAD: begin
          rem     <= {1'b0, b_correct[rb]};
          div     <= b_total[rb];
          rb_full <= (b_correct[rb] >= b_total[rb]);
          quo     <= '0;
          rbit    <= ($clog2(FRAC_W+1))'(FRAC_W);
          rstate  <= R_DIV;
        end
        R_DIV: begin
          if (rbit != 0) begin
            // shift in one quotient bit
            if ((rem << 1) >= {1'b0, div}) begin
              rem <= (rem << 1) - {1'b0, div};
              quo <= {quo[FRAC_W-2:0], 1'b1};
            end else begin
              rem <= rem << 1;
              quo <= {quo[FRAC_W-2:0], 1'b0};
            end
            rbit <= rbit - 1'b1;
          end else if (int'(rb) == NBUCKETS - 1) begin
            rstate <= R_IDLE;
          end else begin
            rb     <= rb + 1'b1;
            rstate <= R_LOAD;
          end
        end
        default: rstate <= R_IDLE;
      endcase
    end
  end

  // bucket counts and fractions
  logic [CNT_W-1:0] b_correct_n [NBUCKETS];
  logic [CNT_W-1:0] b_total_n   [NBUCKETS];
  always_comb begin
    for (int i = 0; i < NBUCKETS; i++) begin
      b_correct_n[i] = b_correct[i];
      b_total_n[i]   = b_total[i];
      if (rb_done && int'(rb) == i) begin
        b_correct_n[i] = b_correct[i] >> 1;
        b_total_n[i]   = b_total[i] >> 1;
      end
      if (up_valid && int'(up_b) == i) begin
        if (b_total_n[i] != '1) b_total_n[i] = b_total_n[i] + 1'b1;
        if (up_correct && b_correct_n[i] != '1) b_correct_n[i] = b_correct_n[i] + 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NBUCKETS; i++) begin
        b_correct[i] <= '0;
        b_total[i]   <= '0;
        b_frac[i]    <= '1;
      end
    end else begin
      for (int i = 0; i < NBUCKETS; i++) begin
        b_correct[i] <= b_correct_n[i];
        b_total[i]   <= b_total_n[i];
      end
      if (rb_done) begin
        if (div == '0 || rb_full) b_frac[rb] <= '1;
        else                      b_frac[rb] <= quo;
      end
    end
  end

endmodule
