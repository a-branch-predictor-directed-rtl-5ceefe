// tb_execution_register_file: self-checking test of the execution register
// file. Random writes and reads against a reference array; checks reset to
// zero, r31 reading zero, and write-through of a same-cycle write.
module tb_execution_register_file;
  import bfetch_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic    wr_en;
  regidx_t wr_idx, rd_idx;
  xword_t  wr_data, rd_data;
  xword_t  ref_regs [32];

  execution_register_file dut (.*);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; wr_idx = '0; wr_data = '0; rd_idx = '0;
    for (int i = 0; i < 32; i++) ref_regs[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 32; i++) begin
      @(negedge clk); rd_idx = regidx_t'(i); #1;
      check(rd_data == 0, "reset value");
    end
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      wr_en   = $urandom % 2;
      wr_idx  = regidx_t'($urandom);
      wr_data = {$urandom, $urandom};
      rd_idx  = (i % 4 == 0) ? wr_idx : regidx_t'($urandom);
      #1;
      if (rd_idx == 31)                     check(rd_data == 0, "r31 is zero");
      else if (wr_en && wr_idx == rd_idx)   check(rd_data == wr_data, "write-through");
      else                                  check(rd_data == ref_regs[rd_idx], "read");
      @(posedge clk);
      if (wr_en) ref_regs[wr_idx] = wr_data;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
