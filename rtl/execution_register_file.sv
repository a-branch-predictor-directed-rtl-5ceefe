// execution_register_file: B-Fetch's copy of the core's integer registers.
//
// The offset-mode prefetch address is built from the register value "as it
// exists in the dynamic execution core", not the committed one. This block
// keeps that copy: the core's integer writeback writes it, the prefetch
// calculate stage reads the base register of a load. 32 x 64-bit registers
// (256 bytes) follow the document; register 31 reads as zero, as on Alpha.
// One write port and one combinational read port; a write and a read of the
// same register in one cycle returns the new value (write-through), which is
// this design's choice. Reset clears the registers.
module execution_register_file
  import bfetch_pkg::*;
#(
  parameter int NREGS = 32
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    wr_en,
  input  regidx_t wr_idx,
  input  xword_t  wr_data,
  input  regidx_t rd_idx,
  output xword_t  rd_data
);

  xword_t regs [NREGS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (wr_en) begin
      regs[wr_idx] <= wr_data;
    end
  end

  always_comb begin
    if (int'(rd_idx) == NREGS - 1)         rd_data = '0;
    else if (wr_en && (wr_idx == rd_idx))  rd_data = wr_data;
    else                                   rd_data = regs[rd_idx];
  end

endmodule
