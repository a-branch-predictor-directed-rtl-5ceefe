// branch_trace_cache: links each branch outcome to the branch that follows it.
//
// Direct-mapped table. The index and a partial tag are hashed from the
// branch PC, its direction and its target, so a taken indirect branch gets a
// separate link for every target it has jumped to. An entry holds the PC of
// the next branch on that path and its call / return / unconditional bits,
// which the branch predictor needs when the lookahead stage asks it about the
// next branch. Entries are written only from commit (through the last
// committed branch buffer), never from speculation. 256 entries follow the
// document; the hash itself is this design's choice:
//   index = pc[2+:IW] ^ target[2+:IW] ^ dir
//   tag   = pc[2+IW+:TAG_W] ^ target[2+IW+:TAG_W]
//
// Timing: the read is combinational (rd_* in the same cycle as rd_key), so
// that a trace cache lookup and a branch predictor lookup fit in one lookahead
// cycle. A write takes effect at the clock edge. Reset clears all valid bits.
module branch_trace_cache
  import bfetch_pkg::*;
#(
  parameter int ENTRIES = 256,
  parameter int TAG_W   = 9
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     wr_en,
  input  br_key_t  wr_key,
  input  xword_t   wr_next_pc,
  input  br_kind_t wr_kind,
  input  br_key_t  rd_key,
  output logic     rd_hit,
  output xword_t   rd_next_pc,
  output br_kind_t rd_kind
);

  localparam int IW = $clog2(ENTRIES);

  typedef struct packed {
    logic [TAG_W-1:0] tag;
    xword_t           next_pc;
    br_kind_t         kind;
  } btc_entry_t;

  logic [ENTRIES-1:0] valid_q;
  btc_entry_t         mem [ENTRIES];

  function automatic logic [IW-1:0] idx_of(br_key_t k);
    return k.pc[2 +: IW] ^ k.target[2 +: IW] ^ IW'(k.dir);
  endfunction

  function automatic logic [TAG_W-1:0] tag_of(br_key_t k);
    return k.pc[2+IW +: TAG_W] ^ k.target[2+IW +: TAG_W];
  endfunction

  logic [IW-1:0] widx, ridx;
  assign widx = idx_of(wr_key);
  assign ridx = idx_of(rd_key);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) valid_q <= '0;
    else if (wr_en) valid_q[widx] <= 1'b1;
  end

  always_ff @(posedge clk) begin
    if (wr_en) mem[widx] <= '{tag: tag_of(wr_key), next_pc: wr_next_pc, kind: wr_kind};
  end

  always_comb begin
    rd_hit     = valid_q[ridx] && (mem[ridx].tag == tag_of(rd_key));
    rd_next_pc = mem[ridx].next_pc;
    rd_kind    = mem[ridx].kind;
  end

endmodule
