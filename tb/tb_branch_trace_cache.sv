// tb_branch_trace_cache: self-checking test of the branch trace cache.
// Writes random links, keeping a reference of which key last owned each
// direct-mapped set (index = pc[2+:8] ^ target[2+:8] ^ dir), then looks up
// every written key and some never-written keys. A key must hit with its
// next branch and kind while it still owns its set, and miss once a
// conflicting key replaced it or if it was never written. Also checks that the
// taken and not-taken outcomes of one branch are separate links and that the
// read is available in the same cycle.
module tb_branch_trace_cache;
  import bfetch_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic     wr_en;
  br_key_t  wr_key, rd_key;
  xword_t   wr_next_pc, rd_next_pc;
  br_kind_t wr_kind, rd_kind;
  logic     rd_hit;

  branch_trace_cache dut (.*);

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

  function automatic int set_of(br_key_t k);
    return int'(k.pc[9:2] ^ k.target[9:2] ^ {7'd0, k.dir});
  endfunction

  br_key_t  keys [64];
  xword_t   nexts[64];
  br_kind_t kinds[64];
  int       owner[256];

  initial begin
    wr_en = 0; wr_key = '0; wr_next_pc = '0; wr_kind = '0; rd_key = '0;
    for (int s = 0; s < 256; s++) owner[s] = -1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // small pc range so that some keys share a set
    for (int i = 0; i < 64; i++) begin
      keys[i].pc     = 64'h1000 + 64'(($urandom % 128) * 4);
      keys[i].dir    = $urandom % 2;
      keys[i].target = 64'h8000 + 64'(($urandom % 128) * 4);
      nexts[i]       = 64'h2000 + 64'(i * 4);
      kinds[i]       = br_kind_t'(i % 8);
      @(negedge clk);
      wr_en = 1; wr_key = keys[i]; wr_next_pc = nexts[i]; wr_kind = kinds[i];
      @(posedge clk);
      owner[set_of(keys[i])] = i;
      @(negedge clk);
      wr_en = 0;
    end
    for (int i = 0; i < 64; i++) begin
      int o;
      rd_key = keys[i];
      #1;
      o = owner[set_of(keys[i])];
      if (o >= 0 && keys[o] == keys[i]) begin
        check(rd_hit, $sformatf("hit %0d", i));
        check(rd_next_pc == nexts[o], "next pc");
        check(rd_kind == kinds[o], "kind");
      end else begin
        check(!rd_hit || (rd_next_pc == nexts[o]), "replaced key reads only the owner's data");
      end
    end
    // never-written key in an empty set must miss
    for (int t = 0; t < 20; t++) begin
      rd_key.pc = 64'h40_0000 + 64'(($urandom % 1024) * 4);
      rd_key.dir = $urandom % 2;
      rd_key.target = 64'h80_0000 + 64'(($urandom % 1024) * 4);
      #1;
      if (owner[set_of(rd_key)] < 0) check(!rd_hit, "empty set misses");
    end
    // two directions of one branch are different links
    @(negedge clk);
    wr_en = 1; wr_key = '{pc: 64'h5000, dir: 1'b0, target: 64'h5004}; wr_next_pc = 64'hAAA0; wr_kind = 3'b000;
    @(negedge clk);
    wr_key = '{pc: 64'h5000, dir: 1'b1, target: 64'h6010}; wr_next_pc = 64'hBBB0; wr_kind = 3'b001;
    @(negedge clk);
    wr_en = 0;
    rd_key = '{pc: 64'h5000, dir: 1'b0, target: 64'h5004}; #1;
    check(rd_hit && rd_next_pc == 64'hAAA0, "not-taken link");
    rd_key = '{pc: 64'h5000, dir: 1'b1, target: 64'h6010}; #1;
    check(rd_hit && rd_next_pc == 64'hBBB0 && rd_kind == 3'b001, "taken link");
    rd_key = '{pc: 64'h5000, dir: 1'b1, target: 64'h7000}; #1;
    check(!rd_hit || rd_next_pc != 64'hBBB0, "other target of an indirect branch is another link");
    // a key that maps to the same set with another tag must miss
    for (int n = 0; n < 40; n++) begin
      rd_key = '{pc: 64'h5000 + 64'((1 + $urandom % 500) << 10), dir: 1'b0, target: 64'h5004}; #1;
      check(!rd_hit, "same set, other tag misses");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
