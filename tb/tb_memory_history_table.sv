// tb_memory_history_table: self-checking test of the MHT commit update and
// lookup. The same basic block (opened by branch KA) is committed four times:
//   ld 8(r2); ld 512(r1); ld 384(r1); ld 640(r1); r4 := ..; ld 16(r4);
//   r4 := ..; ld 8(r4); ld 0(r11)
// r1 grows by 0x100 per pass, r2 stays. Expected, worked out by hand from
// the update rules:
//   units: r2/8, r1/512 with negPatt bit 1 and posPatt bit 1 (loads 2 lines
//   below and above), r4/16, r4/8 (new unit after redefinition); the load off
//   r11 finds no free unit;
//   pass 2: gen_offset = commit r1 - genRegVal written by the calculate stage
//   between passes; delta 0x100, skid 0x100, no loop yet;
//   pass 3: skid 0, loop_valid for r1; pass 4 with another displacement for
//   the first load rewrites unit 0. A block without loads misses.
module tb_memory_history_table;
  import bfetch_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic cm_valid, cm_is_branch, cm_is_load, cm_wr_en, cur_block_valid, lk_hit, gw_valid, cm_unit_overflow;
  regidx_t cm_base_idx, cm_wr_idx;
  disp_t cm_disp;
  xword_t cm_base_val, gw_val;
  br_key_t cur_block, lk_key;
  logic [MHT_IDX_W-1:0] lk_idx, gw_idx;
  gen_unit_t [NUM_UNITS-1:0] lk_units;
  unit_idx_t gw_unit;

  memory_history_table dut (.*);

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

  int overflows = 0;
  always @(posedge clk) if (cm_unit_overflow) overflows++;

  task automatic commit(input logic br, input logic ld, input int base, input int disp,
                        input xword_t val, input logic wr, input int wreg);
    @(negedge clk);
    cm_valid = 1; cm_is_branch = br; cm_is_load = ld; cm_base_idx = regidx_t'(base);
    cm_disp = disp_t'(disp); cm_base_val = val; cm_wr_en = wr; cm_wr_idx = regidx_t'(wreg);
    @(negedge clk);
    cm_valid = 0;
  endtask

  localparam br_key_t KA = '{pc: 64'h4000, dir: 1'b0, target: 64'h4004};
  localparam br_key_t KB = '{pc: 64'h4100, dir: 1'b1, target: 64'h9000};

  task automatic pass(input xword_t r1, input int disp0);
    cur_block = KA; cur_block_valid = 1;
    commit(1, 0, 0, 0, 0, 0, 0);                       // branch opening KA
    commit(0, 1, 2, disp0, 64'h20000, 1, 3);           // ld r3, disp0(r2)
    commit(0, 1, 1, 512, r1, 1, 5);                    // ld r5, 512(r1)
    commit(0, 1, 1, 384, r1, 1, 6);                    // ld r6, 384(r1)
    commit(0, 1, 1, 640, r1, 1, 7);                    // ld r7, 640(r1)
    commit(0, 0, 0, 0, 0, 1, 4);                       // r4 := ..
    commit(0, 1, 4, 16, 64'h30000, 1, 8);              // ld r8, 16(r4)
    commit(0, 0, 0, 0, 0, 1, 4);                       // r4 := ..
    commit(0, 1, 4, 8, 64'h40000, 1, 9);               // ld r9, 8(r4)
    commit(0, 1, 11, 0, 64'h50000, 1, 10);             // ld r10, 0(r11)
    // next block: opened by KB, no loads
    commit(1, 0, 0, 0, 0, 0, 0);
    cur_block = KB;
  endtask

  initial begin
    cm_valid = 0; cm_is_branch = 0; cm_is_load = 0; cm_wr_en = 0; cur_block_valid = 0;
    cm_base_idx = '0; cm_wr_idx = '0; cm_disp = '0; cm_base_val = '0; cur_block = '0;
    lk_key = KA; gw_valid = 0; gw_val = '0; gw_idx = '0; gw_unit = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); #1;
    check(!lk_hit, "empty after reset");

    // ---- pass 1
    pass(64'h10000, 8);
    lk_key = KA; #1;
    check(lk_hit, "block KA present");
    check(lk_units[0].valid && lk_units[0].reg_idx == 2 && lk_units[0].disp == 8, "unit0 r2/8");
    check(lk_units[1].valid && lk_units[1].reg_idx == 1 && lk_units[1].disp == 512, "unit1 r1/512");
    check(lk_units[1].neg_patt == 4'b0010, $sformatf("negPatt %b", lk_units[1].neg_patt));
    check(lk_units[1].pos_patt == 4'b0010, $sformatf("posPatt %b", lk_units[1].pos_patt));
    check(lk_units[2].valid && lk_units[2].reg_idx == 4 && lk_units[2].disp == 16, "unit2 r4/16");
    check(lk_units[3].valid && lk_units[3].reg_idx == 4 && lk_units[3].disp == 8, "unit3 r4/8 after redefinition");
    check(lk_units[2].neg_patt == 0 && lk_units[2].pos_patt == 0, "no pattern across redefinition");
    check(lk_units[1].loop_valid == 0 && lk_units[1].gen_offset == 0, "fresh unit");
    check(overflows == 1, "fifth register finds no unit");
    lk_key = KB; #1;
    check(!lk_hit, "block without loads misses");

    // ---- calculate stage records the ERF value it used for unit 1
    lk_key = KA; #1;
    @(negedge clk);
    gw_valid = 1; gw_idx = lk_idx; gw_unit = 2'd1; gw_val = 64'h100C0;
    @(negedge clk);
    gw_valid = 0;

    // ---- pass 2: r1 = 0x10100
    pass(64'h10100, 8);
    lk_key = KA; #1;
    check(lk_units[1].gen_offset == 64'h40, $sformatf("genOffset %h", lk_units[1].gen_offset));
    check(lk_units[1].delta == 64'h100 && lk_units[1].skid == 64'h100, "delta/skid after pass 2");
    check(!lk_units[1].loop_valid, "no loop after two visits");
    check(lk_units[1].neg_patt == 4'b0010 && lk_units[1].pos_patt == 4'b0010, "patterns kept");
    check(lk_units[0].loop_valid && lk_units[0].delta == 0, "constant base: stable");

    // ---- pass 3: r1 = 0x10200: constant delta -> loop
    pass(64'h10200, 8);
    lk_key = KA; #1;
    check(lk_units[1].delta == 64'h100 && lk_units[1].skid == 0, "delta/skid after pass 3");
    check(lk_units[1].loop_valid, "loop mode for r1");
    check(lk_units[1].gen_offset == 64'h40, "genOffset kept without a new genRegVal");

    // ---- pass 4: first load has another displacement: unit 0 rewritten
    pass(64'h10300, 24);
    lk_key = KA; #1;
    check(lk_units[0].disp == 24 && !lk_units[0].loop_valid, "unit0 rewritten");
    check(lk_units[1].loop_valid, "unit1 still a loop");
    check(overflows == 4, "overflow every pass");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
