// last_committed_branch: the last committed branch buffer (LCB).
//
// Holds the most recently committed branch (PC, direction, target). When the
// next branch commits, the pair forms one link of the committed control flow:
// "after this outcome of that branch, the next branch is this one". The link
// is written into the branch trace cache indexed by the LCB content, and the
// LCB is then replaced by the new branch (document, branch trace cache
// section). The LCB content is also the key of the basic block whose
// instructions are committing, which the memory history table update uses.
//
// Timing: link_* is combinational from commit_* and the LCB (valid in the
// cycle the new branch commits); the LCB register updates at the clock edge.
// Reset empties the buffer (this design's choice).
module last_committed_branch
  import bfetch_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     commit_br_valid,
  input  br_key_t  commit_br,
  input  br_kind_t commit_kind,
  output logic     link_valid,
  output br_key_t  link_from,
  output xword_t   link_to_pc,
  output br_kind_t link_to_kind,
  output logic     cur_block_valid,
  output br_key_t  cur_block
);

  logic    lcb_valid;
  br_key_t lcb;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lcb_valid <= 1'b0;
      lcb       <= '0;
    end else if (commit_br_valid) begin
      lcb_valid <= 1'b1;
      lcb       <= commit_br;
    end
  end

  always_comb begin
    link_valid      = commit_br_valid && lcb_valid;
    link_from       = lcb;
    link_to_pc      = commit_br.pc;
    link_to_kind    = commit_kind;
    cur_block_valid = lcb_valid;
    cur_block       = lcb;
  end

endmodule
