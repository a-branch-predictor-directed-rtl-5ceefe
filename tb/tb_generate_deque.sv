// tb_generate_deque: self-checking test of the generate deque.
// Blocks A(bsn 10, key K1), B(11, K2), C(12, K1) are pushed; unit 0 of K1 is
// a loop with delta 0x40 and skid 8. Checks, with expected values worked out
// by hand:
//   * oldest-first hand-over to the calculate stage;
//   * back push: when A finishes with address 0x1000, C (next instance of K1,
//     not yet taken) gets run_addr 0x1000 + 0x40 + 8 and loop_fwd;
//   * front pull: D(13, K1) pushed after C finished with 0x2000 gets
//     0x2000 + 0x48 at once; an offset-mode unit is never forwarded;
//   * retire of bsn 12 drops A and B; flush of bsn 13 drops D;
//   * full at 64 entries (in_ready low), and no push during a flush.
module tb_generate_deque;
  import bfetch_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid, in_ready, job_valid, job_take, done_valid, flush_valid, retire_valid, full;
  logic ev_front_pull, ev_back_push;
  block_entry_t in_blk;
  calc_job_t job;
  logic [5:0] job_slot, done_slot;
  bsn_t done_bsn, flush_bsn, retire_bsn;
  xword_t [NUM_UNITS-1:0] done_addr;
  logic [NUM_UNITS-1:0] done_addr_valid;
  logic [6:0] count;

  generate_deque dut (.*);

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

  int n_fp = 0, n_bp = 0;
  always @(posedge clk) if (rst_n) begin
    if (ev_front_pull) n_fp++;
    if (ev_back_push) n_bp++;
  end

  localparam br_key_t K1 = '{pc: 64'h100, dir: 1'b1, target: 64'h80};
  localparam br_key_t K2 = '{pc: 64'h200, dir: 1'b0, target: 64'h204};

  function automatic block_entry_t mk(bsn_t b, br_key_t k);
    block_entry_t e;
    e = '0;
    e.bsn = b; e.key = k;
    e.units[0].valid = 1; e.units[0].reg_idx = 5'd1; e.units[0].loop_valid = (k == K1);
    e.units[0].delta = 64'h40; e.units[0].skid = 64'h8;
    e.units[1].valid = 1; e.units[1].reg_idx = 5'd2; e.units[1].loop_valid = 0;
    return e;
  endfunction

  task automatic push(input block_entry_t e);
    @(negedge clk);
    in_valid = 1; in_blk = e;
    #1 check(in_ready, "push accepted");
    @(negedge clk);
    in_valid = 0;
  endtask

  task automatic take_and_finish(input bsn_t expect_bsn, input xword_t a0);
    logic [5:0] s;
    @(negedge clk);
    check(job_valid && job.blk.bsn == expect_bsn, $sformatf("job bsn %0d expected %0d", job.blk.bsn, expect_bsn));
    s = job_slot;
    job_take = 1;
    @(negedge clk);
    job_take = 0;
    done_valid = 1; done_slot = s; done_bsn = expect_bsn;
    done_addr = '0; done_addr[0] = a0; done_addr[1] = 64'h7000;
    done_addr_valid = 4'b0011;
    @(negedge clk);
    done_valid = 0;
  endtask

  initial begin
    in_valid = 0; in_blk = '0; job_take = 0; done_valid = 0; done_slot = '0; done_bsn = '0;
    done_addr = '0; done_addr_valid = '0; flush_valid = 0; flush_bsn = '0; retire_valid = 0; retire_bsn = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    push(mk(12'd10, K1));
    push(mk(12'd11, K2));
    push(mk(12'd12, K1));
    check(count == 3, "three entries");
    check(n_fp == 0, "no front pull without a calculated instance");

    take_and_finish(12'd10, 64'h1000);
    check(n_bp == 1, "back push from A to C");
    take_and_finish(12'd11, 64'h5000);
    check(n_bp == 1, "K2 has no loop unit: no back push");
    @(negedge clk);
    check(job_valid && job.blk.bsn == 12'd12, "C offered");
    check(job.loop_fwd == 4'b0001 && job.run_addr[0] == 64'h1048,
          $sformatf("C forwarded: fwd %b addr %h", job.loop_fwd, job.run_addr[0]));
    take_and_finish(12'd12, 64'h2000);

    push(mk(12'd13, K1));
    check(n_fp == 1, "front pull");
    @(negedge clk);
    check(job_valid && job.blk.bsn == 12'd13, "D offered");
    check(job.loop_fwd == 4'b0001 && job.run_addr[0] == 64'h2048,
          $sformatf("D pulled: fwd %b addr %h", job.loop_fwd, job.run_addr[0]));

    // retire branch 12: A and B leave
    @(negedge clk);
    retire_valid = 1; retire_bsn = 12'd12;
    @(negedge clk);
    retire_valid = 0;
    check(count == 2, $sformatf("retire drops two (count %0d)", count));
    // flush branch 13: D leaves
    @(negedge clk);
    flush_valid = 1; flush_bsn = 12'd13; in_valid = 1; in_blk = mk(12'd14, K2);
    #1 check(!in_ready, "no push during a flush");
    @(negedge clk);
    flush_valid = 0; in_valid = 0;
    check(count == 1, $sformatf("flush drops D (count %0d)", count));
    check(!job_valid, "nothing left to calculate");

    // fill up
    for (int i = 0; i < 63; i++) push(mk(bsn_t'(20 + i), K2));
    check(count == 64 && full, "full at 64");
    @(negedge clk);
    in_valid = 1; in_blk = mk(12'd200, K2);
    #1 check(!in_ready, "no push when full");
    @(negedge clk);
    in_valid = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
