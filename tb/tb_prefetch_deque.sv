// tb_prefetch_deque: self-checking test of the prefetch deque against a
// queue model written here. Random pushes (BSNs in program order), random
// L1D readiness, MSHR fills, flushes (drop BSN >= f) and retires (drop
// BSN < r). Checks every offered address, the 7-MSHR issue limit, the
// 100-entry capacity and the count. Directed parts: issue stops at 7
// outstanding prefetches and resumes one per fill; a full deque refuses a push.
module tb_prefetch_deque;
  import bfetch_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid, in_ready, out_valid, out_ready, fill, flush_valid, retire_valid;
  logic ev_mshr_block, ev_flush_drop, ev_retire_drop;
  xword_t in_addr, out_addr;
  bsn_t in_bsn, flush_bsn, retire_bsn;
  logic [6:0] count;
  logic [2:0] mshr_used;

  prefetch_deque dut (.*);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  xword_t qa[$];
  bsn_t   qb[$];
  int     used;
  bsn_t   cur_bsn;
  int     issued;

  // one cycle: drive at negedge, compare, update the model at posedge
  task automatic cycle(input logic push, input logic rdy, input logic fl, input logic fe,
                       input bsn_t fb, input logic re, input bsn_t rb);
    logic exp_valid, dropped, exp_ready;
    @(negedge clk);
    in_valid = push; in_addr = {$urandom, $urandom} & ~64'h3f; in_bsn = cur_bsn;
    out_ready = rdy; fill = fl; flush_valid = fe; flush_bsn = fb; retire_valid = re; retire_bsn = rb;
    #1;
    dropped   = re && qb.size() > 0 && bsn_older(qb[0], rb);
    exp_valid = qa.size() > 0 && used < 7 && !dropped && !fe;
    exp_ready = qa.size() < 100 && !fe;
    check(out_valid == exp_valid, $sformatf("out_valid %0d exp %0d", out_valid, exp_valid));
    if (exp_valid) check(out_addr == qa[0], "front address");
    check(in_ready == exp_ready, "in_ready");
    check(int'(count) == qa.size(), "count");
    check(int'(mshr_used) == used, "mshr count");
    @(posedge clk);
    if (out_valid && rdy) begin void'(qa.pop_front()); void'(qb.pop_front()); used++; issued++; end
    if (fl && used > 0) used--;
    if (fe) begin
      while (qb.size() > 0 && !bsn_older(qb[qb.size()-1], fb)) begin void'(qa.pop_back()); void'(qb.pop_back()); end
    end else begin
      if (re) while (qb.size() > 0 && bsn_older(qb[0], rb)) begin void'(qa.pop_front()); void'(qb.pop_front()); end
      if (push && exp_ready) begin qa.push_back(in_addr); qb.push_back(in_bsn); end
    end
  endtask

  initial begin
    int blocked;
    in_valid = 0; in_addr = '0; in_bsn = '0; out_ready = 0; fill = 0;
    flush_valid = 0; flush_bsn = '0; retire_valid = 0; retire_bsn = '0;
    used = 0; cur_bsn = 12'd4000; issued = 0; blocked = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // ---- MSHR limit: 10 addresses, L1D always ready, no fills
    for (int i = 0; i < 10; i++) cycle(1, 0, 0, 0, '0, 0, '0);
    for (int i = 0; i < 12; i++) cycle(0, 1, 0, 0, '0, 0, '0);
    check(issued == 7 && used == 7, $sformatf("issue stops at 7 (%0d)", issued));
    for (int i = 0; i < 3; i++) begin
      cycle(0, 1, 1, 0, '0, 0, '0);
      cycle(0, 1, 0, 0, '0, 0, '0);
    end
    check(issued == 10, "one issue per fill");
    for (int i = 0; i < 7; i++) cycle(0, 0, 1, 0, '0, 0, '0);
    // ---- capacity
    for (int i = 0; i < 102; i++) cycle(1, 0, 0, 0, '0, 0, '0);
    check(qa.size() == 100, "full at 100");
    // ---- retire everything, then random traffic
    cycle(0, 0, 0, 0, '0, 1, cur_bsn + 1'b1);
    check(qa.size() == 0, "retire empties");
    cycle(0, 0, 0, 0, '0, 0, '0);
    for (int i = 0; i < 5000; i++) begin
      logic p, fe, re;
      bsn_t fb, rb;
      if ($urandom % 4 == 0) cur_bsn = cur_bsn + 1'b1;
      p  = ($urandom % 3) != 0;
      fe = ($urandom % 60) == 0;
      re = ($urandom % 15) == 0;
      fb = cur_bsn - bsn_t'($urandom % 6);
      rb = cur_bsn - bsn_t'($urandom % 12);
      if (fe) cur_bsn = fb;
      cycle(p, ($urandom % 4) != 0, ($urandom % 3) == 0, fe, fb, re, rb);
      if (ev_mshr_block) blocked++;
    end
    check(blocked > 0, "MSHR limit reached under random traffic");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
