// tb_last_committed_branch: self-checking test of the last committed branch
// buffer. Commits a random stream of branches (with idle cycles in between)
// and checks that every branch after the first produces exactly one link
// from the previously committed branch to it, carrying its kind bits, and
// that cur_block always names the last committed branch.
module tb_last_committed_branch;
  import bfetch_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic     commit_br_valid;
  br_key_t  commit_br;
  br_kind_t commit_kind;
  logic     link_valid, cur_block_valid;
  br_key_t  link_from, cur_block;
  xword_t   link_to_pc;
  br_kind_t link_to_kind;

  last_committed_branch dut (.*);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    br_key_t prev;
    logic    have_prev;
    have_prev = 0;
    prev = '0;
    commit_br_valid = 0; commit_br = '0; commit_kind = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!cur_block_valid, "empty after reset");
    for (int i = 0; i < 200; i++) begin
      commit_br_valid = ($urandom % 3) != 0;
      commit_br.pc     = {32'h0, $urandom} & ~64'h3;
      commit_br.dir    = $urandom % 2;
      commit_br.target = {32'h1, $urandom} & ~64'h3;
      commit_kind      = br_kind_t'($urandom % 8);
      #1;
      check(link_valid == (commit_br_valid && have_prev), "link_valid");
      if (commit_br_valid && have_prev) begin
        check(link_from == prev, "link_from is previous branch");
        check(link_to_pc == commit_br.pc, "link_to_pc is new branch");
        check(link_to_kind == commit_kind, "kind passed on");
      end
      check(cur_block_valid == have_prev, "cur_block_valid");
      if (have_prev) check(cur_block == prev, "cur_block");
      @(posedge clk);
      if (commit_br_valid) begin prev = commit_br; have_prev = 1; end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
