// memory_history_table: the loads of each basic block, compressed by register.
//
// One entry per basic block, indexed and partially tagged by the branch that
// opens it (PC, direction, target). An entry has NUM_UNITS units; a unit
// stands for every load of the block based on one register (until that
// register is redefined):
//   reg_idx, reg_disp    base register and displacement of the first load;
//   neg_patt, pos_patt   bit k set: another load k+1 cache lines below /
//                        above the first one;
//   com_reg_val          base register value when the load last committed;
//   gen_reg_val, gen_valid  execution register value the last prefetch used;
//   gen_offset           commit value minus that execution value, added to the
//                        next offset-mode prefetch;
//   delta, skid, loop_valid  loop mode: change of the commit value between
//                        two visits, change of that change, and whether the
//                        unit behaves as a loop (skid 0, or skid unchanged).
//
// Commit update (one committed instruction per cycle). cur_block is the
// opening branch of the block now committing (from the last committed branch
// buffer). A committed branch starts a new block: unit counter and the unit
// allocation table (UAT) are cleared. A committed load off register r:
//   * r mapped in the UAT to unit u: set the pattern bit for the line
//     distance of this load from unit u's first load (1..4 lines);
//   * r not mapped: take the next unit k. If unit k already holds the same
//     register and displacement (the block is seen again), update it in
//     place: gen_offset from gen_reg_val if gen_valid, then delta, skid,
//     loop_valid, com_reg_val. Otherwise start it afresh. Map r to k.
// A committed instruction that writes a register removes its UAT mapping.
// The register lookup stage reads an entry combinationally (lk_*); the
// prefetch calculate stage records the execution register value it used
// (gw_*). Entry and unit organisation, fields, UAT and update rules follow the
// document; the hash, the in-place matching rule and pattern range are this
// design's reading of it. Reset clears the valid bits.
module memory_history_table
  import bfetch_pkg::*;
#(
  parameter int ENTRIES = 128,
  parameter int TAG_W   = 8
) (
  input  logic      clk,
  input  logic      rst_n,
  // commit stream
  input  logic      cm_valid,
  input  logic      cm_is_branch,
  input  logic      cm_is_load,
  input  regidx_t   cm_base_idx,
  input  disp_t     cm_disp,
  input  xword_t    cm_base_val,   // architectural value of the base register
  input  logic      cm_wr_en,      // instruction writes a register
  input  regidx_t   cm_wr_idx,
  input  logic      cur_block_valid,
  input  br_key_t   cur_block,
  // register lookup stage
  input  br_key_t   lk_key,
  output logic      lk_hit,
  output logic [MHT_IDX_W-1:0] lk_idx,
  output gen_unit_t [NUM_UNITS-1:0] lk_units,
  // generate register value write-back from the calculate stage
  input  logic      gw_valid,
  input  logic [MHT_IDX_W-1:0] gw_idx,
  input  unit_idx_t gw_unit,
  input  xword_t    gw_val,
  // status
  output logic      cm_unit_overflow   // load found no free unit
);

  localparam int IW = $clog2(ENTRIES);
  typedef mht_unit_t [NUM_UNITS-1:0] units_t;

  logic [ENTRIES-1:0] valid_q;
  logic [TAG_W-1:0]   tag_q  [ENTRIES];
  units_t             units_q[ENTRIES];

  function automatic logic [IW-1:0] idx_of(br_key_t k);
    return k.pc[2 +: IW] ^ k.target[2 +: IW] ^ IW'(k.dir);
  endfunction

  function automatic logic [TAG_W-1:0] tag_of(br_key_t k);
    return k.pc[2+IW +: TAG_W] ^ k.target[2+IW +: TAG_W];
  endfunction

  // ---------------- lookup
  logic [IW-1:0] lidx;
  assign lidx   = idx_of(lk_key);
  assign lk_hit = valid_q[lidx] && tag_q[lidx] == tag_of(lk_key);
  assign lk_idx = MHT_IDX_W'(lidx);

  always_comb begin
    for (int u = 0; u < NUM_UNITS; u++) begin
      lk_units[u].valid      = units_q[lidx][u].reg_valid;
      lk_units[u].reg_idx    = units_q[lidx][u].reg_idx;
      lk_units[u].disp       = units_q[lidx][u].reg_disp;
      lk_units[u].neg_patt   = units_q[lidx][u].neg_patt;
      lk_units[u].pos_patt   = units_q[lidx][u].pos_patt;
      lk_units[u].gen_offset = units_q[lidx][u].gen_offset;
      lk_units[u].loop_valid = units_q[lidx][u].loop_valid;
      lk_units[u].delta      = units_q[lidx][u].delta;
      lk_units[u].skid       = units_q[lidx][u].skid;
    end
  end

  // ---------------- commit update
  logic                       uat_hit;
  unit_idx_t                  uat_unit;
  logic [$clog2(NUM_UNITS+1)-1:0] next_unit;   // units used in this block
  logic                       ld_commit;
  logic [IW-1:0]              cidx;
  logic                       chit;
  units_t                     cunits;         // entry after the update
  logic                       alloc;
  unit_idx_t                  alloc_unit;

  assign ld_commit = cm_valid && cm_is_load && cur_block_valid;
  assign cidx      = idx_of(cur_block);
  assign chit      = valid_q[cidx] && tag_q[cidx] == tag_of(cur_block);

  unit_allocation_table #(.NREGS(32)) u_uat (
    .clk, .rst_n,
    .clear_all (cm_valid && cm_is_branch),
    .inval_en  (cm_valid && cm_wr_en),
    .inval_idx (cm_wr_idx),
    .alloc_en  (alloc),
    .alloc_idx (cm_base_idx),
    .alloc_unit(alloc_unit),
    .lk_idx    (cm_base_idx),
    .lk_hit    (uat_hit),
    .lk_unit   (uat_unit)
  );

  always_comb begin
    mht_unit_t o, n;
    xword_t    ea_new, ea_first, nd;
    logic signed [XLEN-LINE_OFF-1:0] ldist;
    cunits           = chit ? units_q[cidx] : '0;
    alloc            = 1'b0;
    alloc_unit       = unit_idx_t'(next_unit);
    cm_unit_overflow = 1'b0;
    o = '0; n = '0; ea_new = '0; ea_first = '0; nd = '0; ldist = '0;
    if (ld_commit) begin
      ea_new = cm_base_val + XLEN'(cm_disp);
      if (uat_hit && chit) begin
        // another load off an already mapped register: pattern bit
        o        = cunits[uat_unit];
        ea_first = cm_base_val + XLEN'(o.reg_disp);
        ldist    = $signed(ea_new[XLEN-1:LINE_OFF]) - $signed(ea_first[XLEN-1:LINE_OFF]);
        for (int k = 0; k < PATT_W; k++) begin
          if (ldist == -($bits(ldist))'(k + 1)) o.neg_patt[k] = 1'b1;
          if (ldist ==  ($bits(ldist))'(k + 1)) o.pos_patt[k] = 1'b1;
        end
        cunits[uat_unit] = o;
      end else if (!uat_hit && int'(next_unit) < NUM_UNITS) begin
        alloc = 1'b1;
        o     = cunits[alloc_unit];
        if (o.reg_valid && o.reg_idx == cm_base_idx && o.reg_disp == cm_disp) begin
          // same load seen again: offset and loop bookkeeping
          n = o;
          if (o.gen_valid) begin
            n.gen_offset = cm_base_val - o.gen_reg_val;
            n.gen_valid  = 1'b0;
          end
          nd           = cm_base_val - o.com_reg_val;
          n.skid       = nd - o.delta;
          n.loop_valid = (n.skid == '0) || (n.skid == o.skid);
          n.delta      = nd;
          n.com_reg_val = cm_base_val;
        end else begin
          n             = '0;
          n.reg_valid   = 1'b1;
          n.reg_idx     = cm_base_idx;
          n.reg_disp    = cm_disp;
          n.com_reg_val = cm_base_val;
        end
        cunits[alloc_unit] = n;
      end else if (!uat_hit) begin
        cm_unit_overflow = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q   <= '0;
      next_unit <= '0;
    end else begin
      if (cm_valid && cm_is_branch) next_unit <= '0;
      else if (alloc)               next_unit <= next_unit + 1'b1;
      if (ld_commit) valid_q[cidx] <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (ld_commit) begin
      tag_q[cidx]   <= tag_of(cur_block);
      units_q[cidx] <= cunits;
    end
    // the calculate stage's record wins over nothing else in the unit
    if (gw_valid) begin
      units_q[gw_idx[IW-1:0]][gw_unit].gen_reg_val <= gw_val;
      units_q[gw_idx[IW-1:0]][gw_unit].gen_valid   <= 1'b1;
    end
  end

endmodule
