// tb_bfetch_top: end-to-end test of the B-Fetch prefetcher at its default
// sizes, driven by a small model of a core running a loop.
//
// The program is a loop of six basic blocks; block i is opened by branch i
// (pc 0x1000 + 0x100*i; the last one is taken back to block 0). Per
// iteration `it`, r1 = 0x100000 + 0x200*it and r3 = 0x300000 + 0x40*it walk
// arrays, r2 and r4..r8 are constant bases:
//   block 0: ld 0(r1); ld 64(r1); ld 8(r2)        block 3: no loads
//   block 1: ld 16(r3)                            block 4: loads off r4..r8
//   block 2: ld -128(r1); ld 0(r2)                block 5: ld 256(r1); r1,r3 +=
// The core model fetches branches in order (each with a BSN), writes the
// execution register file as it executes block 5 (so the ERF runs ahead of
// commit), commits a fixed number of branches behind fetch, one instruction
// per cycle, and trains the confidence estimator; branch 2 is mispredicted
// half of the time, which gives its bucket a low ratio. Every 97 fetches a
// misprediction flush re-fetches from three branches back; for a while commit
// stalls while fetch runs ahead (as behind a long miss). The L1D model
// accepts requests and returns each fill 40 cycles later.
//
// Checks: every prefetched line is a line the program loads at some
// iteration; demand loads find prefetched lines; and each mechanism happened:
// the lookahead states (run, confidence stall, depth stall, trace cache miss,
// back-pressure), MHT hits and misses, unit overflow, front pull, back push,
// loop-mode, offset-mode and pattern addresses, flush and retire filtering,
// the MSHR limit and the confidence ratio refresh.
module tb_bfetch_top;
  import bfetch_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int NB = 6;
  localparam int STEPS = 4000;

  logic fetch_valid, flush_valid, cm_valid, cm_is_branch, cm_is_load, cm_wr_en, wb_valid;
  br_key_t fetch_br, flush_br, cm_br;
  bsn_t fetch_bsn, flush_bsn, cm_bsn;
  br_kind_t cm_kind, bp_kind;
  regidx_t cm_base_idx, cm_wr_idx, wb_idx;
  disp_t cm_disp;
  xword_t cm_base_val, wb_data, bp_pc, bp_target, pf_req_addr;
  logic bp_dir;
  logic [9:0] bp_lhist, rs_lhist;
  logic [11:0] bp_ghist, rs_ghist;
  logic [1:0] bp_self_l, bp_self_g, rs_self_l, rs_self_g;
  logic rs_valid, rs_correct, pf_req_valid, pf_req_ready;
  logic pf_fill = 1'b0;
  la_state_t la_state;
  logic [3:0] la_depth;
  logic [7:0] la_path_conf;
  logic [6:0] gd_count, pd_count;
  logic [2:0] pf_mshr_used;
  logic ev_mht_hit, ev_mht_miss, ev_front_pull, ev_back_push, ev_loop_addr, ev_offset_addr;
  logic ev_patt_addr, ev_flush_drop, ev_retire_drop, ev_mshr_block, ev_unit_overflow;
  logic [5:0] conf_number;
  logic conf_refresh, gd_full, calc_busy;

  bfetch_top dut (.*);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- program
  function automatic br_key_t key_of(int i);
    br_key_t k;
    k.pc     = 64'h1000 + 64'(i * 256);
    k.dir    = (i == NB - 1);
    k.target = k.dir ? 64'h0F04 : k.pc + 64'h4;
    return k;
  endfunction

  function automatic xword_t reg_val(int r, int it);
    case (r)
      1: return 64'h100000 + 64'(it * 512);
      2: return 64'h200000;
      3: return 64'h300000 + 64'(it * 64);
      default: return 64'h400000 + 64'(r * 4096);
    endcase
  endfunction

  // loads of block i: base register and displacement
  int ld_n [NB] = '{3, 1, 2, 0, 5, 1};
  int ld_r [NB][5] = '{'{1, 1, 2, 0, 0}, '{3, 0, 0, 0, 0}, '{1, 2, 0, 0, 0},
                       '{0, 0, 0, 0, 0}, '{4, 5, 6, 7, 8}, '{1, 0, 0, 0, 0}};
  int ld_d [NB][5] = '{'{0, 64, 8, 0, 0}, '{16, 0, 0, 0, 0}, '{-128, 0, 0, 0, 0},
                       '{0, 0, 0, 0, 0}, '{0, 8, 16, 24, 32}, '{256, 0, 0, 0, 0}};

  function automatic int idx_of_pc(xword_t pc);
    int i;
    i = int'((pc - 64'h1000) >> 8);
    return (i >= 0 && i < NB) ? i : 0;
  endfunction

  // is `line` a line the program loads at some iteration?
  function automatic logic program_line(xword_t line);
    for (int i = 0; i < NB; i++)
      for (int l = 0; l < ld_n[i]; l++)
        for (int it = -50; it < STEPS / NB + 150; it++)
          if (line_of(reg_val(ld_r[i][l], it) + xword_t'(ld_d[i][l])) == line) return 1'b1;
    return 1'b0;
  endfunction

  // ---------------- branch predictor / BTB model (answers the lookahead)
  always_comb begin
    int i;
    i = idx_of_pc(bp_pc);
    bp_dir    = key_of(i).dir;
    bp_target = key_of(i).target;
    bp_lhist  = 10'(i * 3 + 1);
    bp_ghist  = 12'(i * 7 + 5);
    bp_self_l = (i == 2) ? 2'd1 : 2'd3;
    bp_self_g = (i == 2) ? 2'd0 : 2'd3;
  end

  // ---------------- L1D model: accept, fill 40 cycles later
  int fill_at [$];
  int now;
  xword_t pf_lines [xword_t];
  int n_pf, n_bad;
  always @(posedge clk) if (rst_n) begin
    now++;
    if (pf_req_valid && pf_req_ready) begin
      n_pf++;
      fill_at.push_back(now + 40);
      if (!program_line(pf_req_addr)) begin
        n_bad++;
        if (n_bad < 5) $display("FAIL: prefetch of %h is not a program line", pf_req_addr);
      end
      pf_lines[pf_req_addr] = pf_req_addr;
    end
  end
  // one fill per cycle, changed away from the rising edge
  always @(negedge clk) begin
    pf_fill <= 1'b0;
    if (rst_n && fill_at.size() > 0 && fill_at[0] <= now) begin
      void'(fill_at.pop_front());
      pf_fill <= 1'b1;
    end
  end
  assign pf_req_ready = 1'b1;

  // ---------------- event counters
  int n_state [6];
  int n_mht_hit, n_mht_miss, n_fp, n_bp, n_loop, n_off, n_patt, n_fdrop, n_rdrop, n_mshr, n_ovf, n_refresh;
  logic conf_refresh_d;
  always @(posedge clk) if (rst_n) begin
    n_state[int'(la_state)]++;
    n_mht_hit  += int'(ev_mht_hit);
    n_mht_miss += int'(ev_mht_miss);
    n_fp       += int'(ev_front_pull);
    n_bp       += int'(ev_back_push);
    n_loop     += int'(ev_loop_addr);
    n_off      += int'(ev_offset_addr);
    n_patt     += int'(ev_patt_addr);
    n_fdrop    += int'(ev_flush_drop);
    n_rdrop    += int'(ev_retire_drop);
    n_mshr     += int'(ev_mshr_block);
    n_ovf      += int'(ev_unit_overflow);
    if (conf_refresh && !conf_refresh_d) n_refresh++;
    conf_refresh_d <= conf_refresh;
  end

  // ---------------- core model
  int n_fetch, n_commit, n_useful, n_demand;

  task automatic idle_inputs();
    fetch_valid = 0; flush_valid = 0; cm_valid = 0; cm_is_branch = 0; cm_is_load = 0;
    cm_wr_en = 0; wb_valid = 0; rs_valid = 0;
  endtask

  task automatic do_fetch();
    int i, it;
    i  = n_fetch % NB;
    it = n_fetch / NB;
    @(negedge clk);
    idle_inputs();
    fetch_valid = 1; fetch_br = key_of(i); fetch_bsn = bsn_t'(n_fetch);
    if (i == NB - 1) begin
      // block 5 executes: r1 moves on
      wb_valid = 1; wb_idx = 5'd1; wb_data = reg_val(1, it + 1);
    end
    n_fetch++;
  endtask

  task automatic do_commit();
    int i, it;
    i  = n_commit % NB;
    it = n_commit / NB;
    @(negedge clk);
    idle_inputs();
    cm_valid = 1; cm_is_branch = 1; cm_br = key_of(i); cm_kind = '0; cm_bsn = bsn_t'(n_commit);
    cm_is_load = 0; cm_wr_en = 0;
    rs_valid = 1; rs_lhist = 10'(i * 3 + 1); rs_ghist = 12'(i * 7 + 5);
    rs_self_l = (i == 2) ? 2'd1 : 2'd3; rs_self_g = (i == 2) ? 2'd0 : 2'd3;
    rs_correct = (i != 2) || (it % 2 == 0);
    for (int l = 0; l < ld_n[i]; l++) begin
      xword_t ln;
      @(negedge clk);
      idle_inputs();
      cm_valid = 1; cm_is_branch = 0; cm_is_load = 1;
      cm_base_idx = regidx_t'(ld_r[i][l]); cm_disp = disp_t'(ld_d[i][l]);
      cm_base_val = reg_val(ld_r[i][l], it);
      cm_wr_en = 1; cm_wr_idx = 5'd20;
      ln = line_of(cm_base_val + xword_t'(ld_d[i][l]));
      n_demand++;
      if (pf_lines.exists(ln)) n_useful++;
    end
    if (i == NB - 1) begin
      @(negedge clk);
      idle_inputs();
      cm_valid = 1; cm_is_branch = 0; cm_is_load = 0; cm_wr_en = 1; cm_wr_idx = 5'd1;
    end
    n_commit++;
  endtask

  initial begin
    int lag, since_flush;
    idle_inputs();
    fetch_br = '0; flush_br = '0; fetch_bsn = '0; flush_bsn = '0; cm_br = '0; cm_bsn = '0; cm_kind = '0;
    cm_base_idx = '0; cm_wr_idx = '0; cm_disp = '0; cm_base_val = '0; wb_idx = '0; wb_data = '0;
    rs_lhist = '0; rs_ghist = '0; rs_self_l = '0; rs_self_g = '0; rs_correct = 0;
    n_fetch = 0; n_commit = 0; n_useful = 0; n_demand = 0; now = 0; n_pf = 0; n_bad = 0;
    for (int s = 0; s < 6; s++) n_state[s] = 0;
    n_mht_hit = 0; n_mht_miss = 0; n_fp = 0; n_bp = 0; n_loop = 0; n_off = 0; n_patt = 0;
    n_fdrop = 0; n_rdrop = 0; n_mshr = 0; n_ovf = 0; n_refresh = 0; conf_refresh_d = 0;
    since_flush = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // execution register file starts with the iteration-0 values
    for (int r = 1; r <= 8; r++) begin
      @(negedge clk);
      idle_inputs();
      wb_valid = 1; wb_idx = regidx_t'(r); wb_data = reg_val(r, 0);
    end
    for (int step = 0; step < STEPS; step++) begin
      lag = (step >= 2000 && step < 2150) ? 90 : 8;
      if (n_fetch - n_commit < lag) begin
        do_fetch();
        since_flush++;
      end
      if (since_flush >= 97 && n_fetch - n_commit > 4) begin
        // misprediction of the branch three back: flush and re-fetch
        since_flush = 0;
        @(negedge clk);
        idle_inputs();
        n_fetch = n_fetch - 3;
        flush_valid = 1; flush_br = key_of(n_fetch % NB); flush_bsn = bsn_t'(n_fetch);
        n_fetch++;
      end
      if (n_fetch - n_commit > lag - 1 || (step >= 2150 && n_fetch - n_commit > 8)) do_commit();
      @(negedge clk);
      idle_inputs();
    end
    repeat (100) @(negedge clk);

    $display("lookahead states: idle %0d run %0d conf %0d depth %0d miss %0d full %0d",
             n_state[0], n_state[1], n_state[2], n_state[3], n_state[4], n_state[5]);
    $display("mht hit %0d miss %0d, front pull %0d back push %0d, loop %0d offset %0d pattern %0d",
             n_mht_hit, n_mht_miss, n_fp, n_bp, n_loop, n_off, n_patt);
    $display("flush drop %0d retire drop %0d mshr block %0d unit overflow %0d refresh %0d",
             n_fdrop, n_rdrop, n_mshr, n_ovf, n_refresh);
    $display("prefetches %0d, demand loads %0d, found prefetched %0d", n_pf, n_demand, n_useful);

    check(n_bad == 0, $sformatf("%0d prefetches outside the program's lines", n_bad));
    check(n_pf > 100, "prefetches issued");
    check(n_useful * 2 > n_demand, "most demand loads were prefetched");
    check(n_state[int'(LA_RUN)] > 0, "lookahead ran");
    check(n_state[int'(LA_STALL_CONF)] > 0, "confidence stall");
    check(n_state[int'(LA_STALL_DEPTH)] > 0, "depth stall");
    check(n_state[int'(LA_STALL_MISS)] > 0, "trace cache miss stall");
    check(n_state[int'(LA_STALL_FULL)] > 0, "back-pressure stall");
    check(n_mht_hit > 0 && n_mht_miss > 0, "MHT hits and misses");
    check(n_ovf > 0, "unit overflow");
    check(n_fp > 0, "front pull");
    check(n_bp > 0, "back push");
    check(n_loop > 0, "loop-mode addresses");
    check(n_off > 0, "offset-mode addresses");
    check(n_patt > 0, "pattern addresses");
    check(n_fdrop > 0, "flush filtering");
    check(n_rdrop > 0, "retire filtering");
    check(n_mshr > 0, "MSHR limit");
    check(n_refresh > 0, "confidence refresh");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
