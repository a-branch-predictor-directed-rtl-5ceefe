// tb_unit_allocation_table: self-checking test of the unit allocation table.
// Random mix of allocations, redefinitions and block boundaries against a
// reference map; checks that a redefinition in the same cycle as an
// allocation leaves the register unmapped and that a block boundary clears
// every mapping.
module tb_unit_allocation_table;
  import bfetch_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic      clear_all, inval_en, alloc_en, lk_hit;
  regidx_t   inval_idx, alloc_idx, lk_idx;
  unit_idx_t alloc_unit, lk_unit;
  logic      rv [32];
  unit_idx_t ru [32];

  unit_allocation_table dut (.*);

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

  initial begin
    clear_all = 0; inval_en = 0; alloc_en = 0; inval_idx = '0; alloc_idx = '0; alloc_unit = '0; lk_idx = '0;
    for (int i = 0; i < 32; i++) begin rv[i] = 0; ru[i] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      clear_all  = ($urandom % 20) == 0;
      alloc_en   = $urandom % 2;
      alloc_idx  = regidx_t'($urandom % 8);
      alloc_unit = unit_idx_t'($urandom);
      inval_en   = ($urandom % 3) == 0;
      inval_idx  = (i % 5 == 0) ? alloc_idx : regidx_t'($urandom % 8);
      lk_idx     = regidx_t'($urandom % 8);
      #1;
      check(lk_hit == rv[lk_idx], "hit");
      if (rv[lk_idx]) check(lk_unit == ru[lk_idx], "unit");
      @(posedge clk);
      if (clear_all) begin
        for (int r = 0; r < 32; r++) rv[r] = 0;
      end else begin
        if (alloc_en) begin rv[alloc_idx] = 1; ru[alloc_idx] = alloc_unit; end
        if (inval_en) rv[inval_idx] = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
