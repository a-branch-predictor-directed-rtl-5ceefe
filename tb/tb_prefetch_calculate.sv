// tb_prefetch_calculate: self-checking test of the prefetch calculate stage.
// One block with
//   unit0: offset mode, r3 (ERF 0x30000) disp 16, genOffset 0x40,
//          negPatt 0001, posPatt 0100
//   unit1: invalid
//   unit2: loop mode, forwarded running address 0x5008
//   unit3: offset mode, r7 (ERF 0x70000) disp -8
// must give the lines 0x30040, 0x30000 (1 below), 0x30100 (3 above), 0x5000,
// 0x6ffc0, one per cycle when the deque is always ready, record genRegVal
// for units 0 and 3 only, and return base addresses 0x30050, 0x5008, 0x6fff8.
// The same block is then run with a randomly stalling deque (same sequence),
// and once more with a flush of its branch part-way (abandoned, no done).
module tb_prefetch_calculate;
  import bfetch_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic job_valid, job_take, done_valid, gw_valid, pf_valid, pf_ready, flush_valid, retire_valid, busy;
  logic ev_loop_addr, ev_offset_addr, ev_patt_addr;
  calc_job_t job;
  logic [5:0] job_slot, done_slot;
  bsn_t done_bsn, pf_bsn, flush_bsn, retire_bsn;
  xword_t [NUM_UNITS-1:0] done_addr;
  logic [NUM_UNITS-1:0] done_addr_valid;
  regidx_t erf_idx;
  xword_t erf_val, gw_val, pf_addr;
  logic [MHT_IDX_W-1:0] gw_idx;
  unit_idx_t gw_unit;

  prefetch_calculate dut (.*);

  assign erf_val = xword_t'(erf_idx) << 16;   // ERF model: r_i = i * 0x10000

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

  xword_t exp_addr [5] = '{64'h30040, 64'h30000, 64'h30100, 64'h5000, 64'h6ffc0};
  int n_out, n_gw, n_done, first_cyc, last_cyc, cyc;
  int n_loop, n_off, n_patt;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (pf_valid && pf_ready) begin
      if (n_out < 5) check(pf_addr == exp_addr[n_out], $sformatf("address %0d: %h", n_out, pf_addr));
      check(pf_bsn == 12'd77, "bsn carried");
      if (n_out == 0) first_cyc = cyc;
      last_cyc = cyc;
      n_out++;
    end
    if (gw_valid) begin
      n_gw++;
      check(gw_idx == 7'd9, "MHT entry");
      check((gw_unit == 0 && gw_val == 64'h30000) || (gw_unit == 3 && gw_val == 64'h70000), "genRegVal record");
    end
    if (done_valid) begin
      n_done++;
      check(done_slot == 6'd5 && done_bsn == 12'd77, "done slot/bsn");
      check(done_addr_valid == 4'b1101, "done units");
      check(done_addr[0] == 64'h30050 && done_addr[2] == 64'h5008 && done_addr[3] == 64'h6fff8, "running addresses");
    end
    if (ev_loop_addr) n_loop++;
    if (ev_offset_addr) n_off++;
    if (ev_patt_addr) n_patt++;
  end

  initial begin
    job = '0;
    job.blk.bsn = 12'd77;
    job.blk.mht_idx = 7'd9;
    job.blk.units[0].valid = 1; job.blk.units[0].reg_idx = 5'd3; job.blk.units[0].disp = 16'sd16;
    job.blk.units[0].gen_offset = 64'h40; job.blk.units[0].neg_patt = 4'b0001; job.blk.units[0].pos_patt = 4'b0100;
    job.blk.units[2].valid = 1; job.blk.units[2].reg_idx = 5'd9; job.blk.units[2].loop_valid = 1;
    job.loop_fwd = 4'b0100; job.run_addr[2] = 64'h5008;
    job.blk.units[3].valid = 1; job.blk.units[3].reg_idx = 5'd7; job.blk.units[3].disp = -16'sd8;
    job_slot = 6'd5;
    job_valid = 0; pf_ready = 1; flush_valid = 0; retire_valid = 0; flush_bsn = '0; retire_bsn = '0;
    n_out = 0; n_gw = 0; n_done = 0; cyc = 0; n_loop = 0; n_off = 0; n_patt = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---- run 1: always ready
    @(negedge clk);
    job_valid = 1;
    @(negedge clk);
    check(busy, "job taken");
    job_valid = 0;
    repeat (8) @(negedge clk);
    check(n_out == 5, $sformatf("five addresses (%0d)", n_out));
    check(last_cyc - first_cyc == 4, "one address per cycle");
    check(n_gw == 2 && n_done == 1 && !busy, "genRegVal twice, done once");
    check(n_loop == 1 && n_off == 2 && n_patt == 2, "mode counts");

    // ---- run 2: stalling deque
    n_out = 0; n_gw = 0; n_done = 0;
    @(negedge clk);
    job_valid = 1;
    @(negedge clk);
    job_valid = 0;
    for (int i = 0; i < 40; i++) begin
      pf_ready = $urandom % 2;
      @(negedge clk);
    end
    pf_ready = 1;
    repeat (6) @(negedge clk);
    check(n_out == 5 && n_gw == 2 && n_done == 1, "same result under back-pressure");

    // ---- run 3: flushed part-way
    n_out = 0; n_done = 0;
    @(negedge clk);
    job_valid = 1;
    @(negedge clk);
    job_valid = 0;
    @(negedge clk);
    flush_valid = 1; flush_bsn = 12'd70;
    @(negedge clk);
    flush_valid = 0;
    repeat (6) @(negedge clk);
    check(n_out == 2 && n_done == 0 && !busy, $sformatf("flush abandons the block (%0d out)", n_out));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
