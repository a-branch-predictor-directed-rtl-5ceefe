// unit_allocation_table: which MHT unit holds the loads off each register.
//
// While the instructions of one basic block commit, loads off the same base
// register are folded into one unit of the block's memory history table
// entry. This table remembers, per architectural register, the unit it was
// given in the current block. A committed branch starts a new block and clears
// the table; an instruction that redefines a register clears that register's
// mapping, so the next load off it gets a new unit (its address may be
// unrelated to the earlier loads). 32 registers x (valid + unit) = 16 bytes,
// as in the document.
//
// Timing: lookup is combinational; clear, invalidate and allocate act at the
// clock edge. A branch clear wins over both; an invalidate wins over an
// allocate of the same register (a load into its own base register leaves it
// unmapped). Reset clears the table.
module unit_allocation_table
  import bfetch_pkg::*;
#(
  parameter int NREGS = 32
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      clear_all,     // branch committed: new basic block
  input  logic      inval_en,      // register redefined
  input  regidx_t   inval_idx,
  input  logic      alloc_en,      // load allocated a unit
  input  regidx_t   alloc_idx,
  input  unit_idx_t alloc_unit,
  input  regidx_t   lk_idx,
  output logic      lk_hit,
  output unit_idx_t lk_unit
);

  logic      map_valid [NREGS];
  unit_idx_t map_unit  [NREGS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREGS; i++) begin
        map_valid[i] <= 1'b0;
        map_unit[i]  <= '0;
      end
    end else if (clear_all) begin
      for (int i = 0; i < NREGS; i++) map_valid[i] <= 1'b0;
    end else begin
      if (alloc_en) begin
        map_valid[alloc_idx] <= 1'b1;
        map_unit[alloc_idx]  <= alloc_unit;
      end
      // A redefinition after the load (same instruction: load into its own
      // base register) must leave the register unmapped.
      if (inval_en) map_valid[inval_idx] <= 1'b0;
    end
  end

  assign lk_hit  = map_valid[lk_idx];
  assign lk_unit = map_unit[lk_idx];

endmodule
