// prefetch_calculate: the prefetch calculate stage and its calculate buffer.
//
// Takes the oldest uncalculated block from the generate deque into the
// calculate buffer and turns it into cache-line prefetch addresses, one per
// cycle (the prefetch deque has one write port, and only one request per
// cycle leaves it anyway). For every valid unit, in unit order:
//   * base address: in loop mode (loop_fwd, set by the generate deque) the
//     forwarded running address; otherwise (offset mode, the default) the
//     execution register file value of the unit's base register plus the
//     displacement plus gen_offset. In offset mode the register value used is
//     written back to the MHT (genRegVal) so that commit can learn the offset;
//   * then one address per set bit of negPatt (k+1 lines below the base) and
//     of posPatt (k+1 lines above), lowest bit first, clearing each bit as its
//     address is produced.
// When the last address of the block is accepted, the base addresses are
// returned to the generate deque as running addresses (done_*), which also
// triggers back-push forwarding there. The address rules follow the document;
// unit and bit order and the one-cycle bubble between blocks are this
// design's choices.
//
// Timing: a block with N addresses occupies the stage N cycles plus one cycle
// to load it. pf_valid/pf_ready handshake with the prefetch deque; the ERF
// read is combinational. Flush (BSN >= f) or retire (BSN < r) of the block in
// the buffer abandons it.
module prefetch_calculate
  import bfetch_pkg::*;
#(
  parameter int GD_DEPTH = 64
) (
  input  logic      clk,
  input  logic      rst_n,
  // from the generate deque
  input  logic      job_valid,
  input  calc_job_t job,
  input  logic [$clog2(GD_DEPTH)-1:0] job_slot,
  output logic      job_take,
  output logic      done_valid,
  output logic [$clog2(GD_DEPTH)-1:0] done_slot,
  output bsn_t      done_bsn,
  output xword_t [NUM_UNITS-1:0] done_addr,
  output logic [NUM_UNITS-1:0]   done_addr_valid,
  // execution register file
  output regidx_t   erf_idx,
  input  xword_t    erf_val,
  // genRegVal write to the MHT
  output logic      gw_valid,
  output logic [MHT_IDX_W-1:0] gw_idx,
  output unit_idx_t gw_unit,
  output xword_t    gw_val,
  // to the prefetch deque
  output logic      pf_valid,
  output xword_t    pf_addr,
  output bsn_t      pf_bsn,
  input  logic      pf_ready,
  // main pipeline filters
  input  logic      flush_valid,
  input  bsn_t      flush_bsn,
  input  logic      retire_valid,
  input  bsn_t      retire_bsn,
  // status
  output logic      busy,
  output logic      ev_loop_addr,
  output logic      ev_offset_addr,
  output logic      ev_patt_addr
);

  localparam int SW = $clog2(GD_DEPTH);

  logic                   bvalid;
  calc_job_t              b;
  logic [SW-1:0]          bslot;
  logic [NUM_UNITS-1:0]   pend;       // units not finished
  logic                   in_patt;    // base of the current unit emitted
  xword_t                 base_q;     // base of the current unit
  patt_t                  rneg, rpos; // pattern bits still to emit
  xword_t [NUM_UNITS-1:0] addr_q;

  // current unit = lowest pending
  unit_idx_t cu;
  always_comb begin
    cu = '0;
    for (int u = NUM_UNITS - 1; u >= 0; u--) if (pend[u]) cu = unit_idx_t'(u);
  end

  function automatic int low_bit(patt_t p);
    for (int k = 0; k < PATT_W; k++) if (p[k]) return k;
    return 0;
  endfunction

  gen_unit_t cunit;
  xword_t    base_new;
  xword_t    line_base;
  int        kb;
  patt_t     rneg_n, rpos_n;
  logic      unit_end;     // this emission finishes the current unit

  assign cunit    = b.blk.units[cu];
  assign erf_idx  = cunit.reg_idx;
  assign base_new = b.loop_fwd[cu] ? b.run_addr[cu]
                                   : erf_val + XLEN'(cunit.disp) + cunit.gen_offset;

  always_comb begin
    pf_valid       = 1'b0;
    pf_addr        = '0;
    rneg_n         = rneg;
    rpos_n         = rpos;
    kb             = 0;
    line_base      = line_of(base_q);
    ev_loop_addr   = 1'b0;
    ev_offset_addr = 1'b0;
    ev_patt_addr   = 1'b0;
    gw_valid       = 1'b0;
    unit_end       = 1'b0;
    if (bvalid && pend != '0) begin
      pf_valid = 1'b1;
      if (!in_patt) begin
        pf_addr        = line_of(base_new);
        ev_loop_addr   = pf_ready && b.loop_fwd[cu];
        ev_offset_addr = pf_ready && !b.loop_fwd[cu];
        gw_valid       = pf_ready && !b.loop_fwd[cu];
        rneg_n         = cunit.neg_patt;
        rpos_n         = cunit.pos_patt;
      end else if (rneg != '0) begin
        kb        = low_bit(rneg);
        pf_addr   = line_base - (XLEN'(kb + 1) << LINE_OFF);
        rneg_n[kb] = 1'b0;
        ev_patt_addr = pf_ready;
      end else begin
        kb        = low_bit(rpos);
        pf_addr   = line_base + (XLEN'(kb + 1) << LINE_OFF);
        rpos_n[kb] = 1'b0;
        ev_patt_addr = pf_ready;
      end
      unit_end = (rneg_n == '0) && (rpos_n == '0);
    end
  end

  assign pf_bsn  = b.blk.bsn;
  assign gw_idx  = b.blk.mht_idx;
  assign gw_unit = cu;
  assign gw_val  = erf_val;
  assign busy    = bvalid;

  logic last_emit;
  assign last_emit = pf_valid && pf_ready && unit_end && ((pend & ~(NUM_UNITS'(1) << cu)) == '0);

  logic kill;
  assign kill = bvalid && ((flush_valid && !bsn_older(b.blk.bsn, flush_bsn)) ||
                           (retire_valid && bsn_older(b.blk.bsn, retire_bsn)));

  assign job_take        = !bvalid && job_valid && !flush_valid;
  assign done_valid      = bvalid && !kill && ((pend == '0) || last_emit);
  assign done_slot       = bslot;
  assign done_bsn        = b.blk.bsn;
  always_comb begin
    done_addr = addr_q;
    if (pf_valid && !in_patt) done_addr[cu] = base_new;
    for (int u = 0; u < NUM_UNITS; u++) done_addr_valid[u] = b.blk.units[u].valid;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bvalid  <= 1'b0;
      b       <= '0;
      bslot   <= '0;
      pend    <= '0;
      in_patt <= 1'b0;
      base_q  <= '0;
      rneg    <= '0;
      rpos    <= '0;
      addr_q  <= '0;
    end else if (kill || done_valid) begin
      bvalid <= 1'b0;
    end else if (job_take) begin
      bvalid  <= 1'b1;
      b       <= job;
      bslot   <= job_slot;
      in_patt <= 1'b0;
      addr_q  <= '0;
      for (int u = 0; u < NUM_UNITS; u++) pend[u] <= job.blk.units[u].valid;
    end else if (pf_valid && pf_ready) begin
      if (!in_patt) begin
        base_q     <= base_new;
        addr_q[cu] <= base_new;
      end
      rneg <= rneg_n;
      rpos <= rpos_n;
      if (unit_end) begin
        pend[cu] <= 1'b0;
        in_patt  <= 1'b0;
      end else begin
        in_patt  <= 1'b1;
      end
    end
  end

endmodule
