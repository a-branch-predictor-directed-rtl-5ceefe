// tb_lookahead_stage: self-checking test of the branch lookahead stage.
// A chain of 40 branches is modelled here: branch i at pc 0x1000+64*i, its
// direction i%2, its target, and a trace cache that links branch i to branch
// i+1 (with an optional miss). Predictor and confidence answers are functions
// of the queried pc. The test checks
//   * one block per cycle, consecutive BSNs, keys following the chain;
//   * the depth limit of 12 (stall until fetch advances, then one more);
//   * a confidence stall: with one low-confidence branch the path product
//     falls under the per-depth threshold (computed here from the same
//     fixed-point rule) and the walk resumes once fetch passes branches;
//   * a trace cache miss stall and the restart when fetch reaches it;
//   * back-pressure stall; flush restart with the corrected branch and BSN.
module tb_lookahead_stage;
  import bfetch_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int N = 40;
  localparam logic [7:0] TH [12] = '{8'd26, 8'd51, 8'd77, 8'd102, 8'd115, 8'd128, 8'd141, 8'd153, 8'd166, 8'd179, 8'd192, 8'd204};

  logic fetch_valid, flush_valid, retire_valid, btc_hit, bp_dir, out_valid, out_ready;
  br_key_t fetch_br, flush_br, btc_key, out_key;
  bsn_t fetch_bsn, flush_bsn, retire_bsn, out_bsn;
  xword_t btc_next_pc, bp_pc, bp_target;
  br_kind_t btc_kind, bp_kind;
  logic [7:0] br_conf, path_conf;
  la_state_t state;
  logic [3:0] depth;

  lookahead_stage dut (.*);

  int miss_at;          // branch whose trace cache link is missing
  logic [7:0] conf_of [N];

  function automatic br_key_t key_of(int i);
    br_key_t k;
    k.pc     = 64'h1000 + 64'(i * 64);
    k.dir    = i[0];
    k.target = k.dir ? k.pc + 64'h400 : k.pc + 64'h4;
    return k;
  endfunction
  function automatic int idx_of_pc(xword_t pc);
    return int'((pc - 64'h1000) / 64);
  endfunction

  // trace cache, predictor and estimator models (combinational)
  always_comb begin
    int i;
    i = idx_of_pc(btc_key.pc);
    btc_hit     = (i >= 0) && (i < N - 1) && (i != miss_at) && (btc_key == key_of(i));
    btc_next_pc = key_of(i + 1).pc;
    btc_kind    = '0;
  end
  always_comb begin
    int j;
    j = idx_of_pc(bp_pc);
    if (j < 0 || j >= N) j = 0;
    bp_dir    = key_of(j).dir;
    bp_target = key_of(j).target;
    br_conf   = conf_of[j];
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // monitor: emitted blocks follow the chain from the sync point
  int   base_idx;       // chain index of the block with BSN base_bsn
  bsn_t base_bsn;
  int   emitted;
  bsn_t last_bsn;
  int   stall_seen [6];
  always @(posedge clk) if (rst_n) begin
    stall_seen[int'(state)]++;
    if (out_valid && out_ready) begin
      emitted++;
      last_bsn = out_bsn;
      check(out_key == key_of(base_idx + int'(bsn_t'(out_bsn - base_bsn))),
            $sformatf("block bsn %0d follows the chain", out_bsn));
    end
    check(int'(depth) <= 12, "depth limit");
  end

  task automatic fetch(input int i, input bsn_t b);
    @(negedge clk);
    fetch_valid = 1; fetch_br = key_of(i); fetch_bsn = b;
    @(negedge clk);
    fetch_valid = 0;
  endtask

  initial begin
    int c0;
    fetch_valid = 0; flush_valid = 0; retire_valid = 0; out_ready = 1;
    fetch_br = '0; flush_br = '0; fetch_bsn = '0; flush_bsn = '0; retire_bsn = '0;
    miss_at = -1; emitted = 0; last_bsn = '0;
    for (int i = 0; i < 6; i++) stall_seen[i] = 0;
    for (int i = 0; i < N; i++) conf_of[i] = 8'd255;
    base_idx = 0; base_bsn = 12'd100;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(state == LA_IDLE, "idle after reset");

    // ---- 1. run to the depth limit: 13 blocks (bsn 100..112), one per cycle
    fetch(0, 12'd100);
    // sync cycle done; blocks leave the output buffer one per cycle from
    // the second cycle after the sync on
    c0 = emitted;
    repeat (14) @(negedge clk);
    check(emitted - c0 == 13, $sformatf("13 blocks in 14 cycles (got %0d)", emitted - c0));
    repeat (4) @(negedge clk);
    check(emitted - c0 == 13, "no block beyond depth 12");
    check(state == LA_STALL_DEPTH && depth == 12, "depth stall");
    fetch(1, 12'd101);
    repeat (2) @(negedge clk);
    check(emitted - c0 == 14 && last_bsn == 12'd113, "fetch advance frees one more block");

    // ---- 2. confidence stall: branch 20 has confidence 0.25
    conf_of[20] = 8'd64;
    begin
      int p, k, stop_at;
      // fetch will be at branch 13 (bsn 113): branches 14.. are ahead
      p = 255; stop_at = -1;
      for (k = 1; k <= 12; k++) begin
        int nc;
        nc = (p * int'(conf_of[13 + k])) >> 8;
        if (stop_at < 0 && nc < int'(TH[k - 1])) stop_at = k;
        else if (stop_at < 0) p = nc;
      end
      // fetch advances to branch 13 (bsn 113); walk goes on from branch 14
      for (int f = 2; f <= 13; f++) fetch(f, bsn_t'(100 + f));
      repeat (3) @(negedge clk);
      check(state == LA_STALL_CONF, $sformatf("confidence stall (state %0d, depth %0d, path %0d)", state, depth, path_conf));
      check(last_bsn == 12'd119, $sformatf("stalled before branch 20 (last bsn %0d)", last_bsn));
      // fetch passes more branches: depth falls, threshold falls, walk resumes
      for (int f = 14; f <= 18; f++) fetch(f, bsn_t'(100 + f));
      repeat (3) @(negedge clk);
      check(bsn_older(12'd119, last_bsn), "walk resumed past the low-confidence branch");
      check(stop_at == 7, $sformatf("model stalls at depth 7 (%0d)", stop_at));
    end

    // ---- 3. back-pressure
    out_ready = 0;
    for (int f = 19; f <= 21; f++) fetch(f, bsn_t'(100 + f));
    repeat (2) @(negedge clk);
    check(out_valid && state == LA_STALL_FULL, "full stall");
    out_ready = 1;

    // ---- 4. flush: corrected branch 30 with bsn 200
    @(negedge clk);
    flush_valid = 1; flush_br = key_of(30); flush_bsn = 12'd200;
    @(negedge clk);
    flush_valid = 0;
    base_idx = 30; base_bsn = 12'd200;
    repeat (4) @(negedge clk);
    check(last_bsn == 12'd200 || bsn_older(12'd200, last_bsn), "restart from the flushed branch");

    // ---- 5. trace cache miss after branch 34
    miss_at = 34;
    repeat (10) @(negedge clk);
    check(state == LA_STALL_MISS, "trace cache miss stall");
    check(last_bsn == 12'd204, "stops at the branch whose link is missing");
    // the walk waits for fetch to reach branch 34, then resumes
    fetch(31, 12'd201);
    check(state == LA_STALL_MISS, "still waiting");
    miss_at = -1;
    base_idx = 34; base_bsn = 12'd204;
    fetch(34, 12'd204);
    repeat (3) @(negedge clk);
    check(bsn_older(12'd204, last_bsn), "resumed after fetch reached the miss");

    for (int s = 1; s < 6; s++) check(stall_seen[s] > 0, $sformatf("state %0d seen", s));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
