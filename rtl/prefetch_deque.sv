// prefetch_deque: prefetch line addresses waiting to be issued to the L1D.
//
// The calculate stage pushes line addresses, each with the BSN of the basic
// block that produced it, at the back; the oldest is offered to the L1 data
// cache at the front, one per cycle. A prefetch holds one L1 MSHR until its
// fill returns; the prefetcher may hold at most PF_MSHR_MAX of them (7 = 70 %
// of the 10 MSHRs) so that demand misses always find one. Filtering, as in
// the generate deque: a flush of branch f drops every address with BSN >= f
// from the back (wrong path), a retire of branch r drops addresses with
// BSN < r from the front (their loads have issued already). 100 entries and
// the MSHR share follow the document; the handshake and the fill pulse that
// returns an MSHR are this design's choices.
//
// Timing: push when in_valid && in_ready; out_valid is combinational from the
// front entry and the MSHR count, the entry leaves on out_valid && out_ready.
// No push is accepted in a flush cycle. A retire that drops the front entry
// also suppresses its issue in that cycle.
module prefetch_deque
  import bfetch_pkg::*;
#(
  parameter int DEPTH       = 100,
  parameter int PF_MSHR_MAX = 7
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  xword_t in_addr,
  input  bsn_t   in_bsn,
  output logic   in_ready,
  output logic   out_valid,
  output xword_t out_addr,
  input  logic   out_ready,
  input  logic   fill,            // a prefetch MSHR is released
  input  logic   flush_valid,
  input  bsn_t   flush_bsn,
  input  logic   retire_valid,
  input  bsn_t   retire_bsn,
  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic [$clog2(PF_MSHR_MAX+1)-1:0] mshr_used,
  output logic   ev_mshr_block,   // an address waited for a free MSHR
  output logic   ev_flush_drop,   // a flush removed addresses
  output logic   ev_retire_drop   // a retire removed addresses
);

  localparam int PW = $clog2(DEPTH);
  localparam int CW = $clog2(DEPTH + 1);
  localparam int MW = $clog2(PF_MSHR_MAX + 1);

  xword_t        addr_q [DEPTH];
  bsn_t          bsn_q  [DEPTH];
  logic [PW-1:0] tail;
  logic [CW-1:0] cnt;
  logic [MW-1:0] used;

  function automatic logic [PW-1:0] wrap_add(logic [PW-1:0] p, int n);
    int s;
    s = int'(p) + n;
    if (s >= DEPTH) s = s - DEPTH;
    return PW'(s);
  endfunction

  logic [PW-1:0] head;
  assign head = wrap_add(tail, int'(cnt));

  logic [CW-1:0] keep_flush, drop_retire;
  always_comb begin
    keep_flush  = '0;
    drop_retire = '0;
    for (int i = 0; i < DEPTH; i++) begin
      if (CW'(i) < cnt) begin
        if (bsn_older(bsn_q[wrap_add(tail, i)], flush_bsn))  keep_flush  = keep_flush + 1'b1;
        if (bsn_older(bsn_q[wrap_add(tail, i)], retire_bsn)) drop_retire = drop_retire + 1'b1;
      end
    end
  end

  logic front_dropped, issue, push;
  assign front_dropped = retire_valid && (drop_retire != '0);
  assign in_ready  = (cnt != CW'(DEPTH)) && !flush_valid;
  assign push      = in_valid && in_ready;
  assign out_valid = (cnt != '0) && (used < MW'(PF_MSHR_MAX)) && !front_dropped && !flush_valid;
  assign out_addr  = addr_q[tail];
  assign issue     = out_valid && out_ready;

  assign count          = cnt;
  assign mshr_used      = used;
  assign ev_mshr_block  = (cnt != '0) && (used >= MW'(PF_MSHR_MAX));
  assign ev_flush_drop  = flush_valid && (keep_flush != cnt);
  assign ev_retire_drop = !flush_valid && front_dropped;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tail <= '0;
      cnt  <= '0;
      used <= '0;
    end else begin
      used <= used + MW'(issue) - MW'(fill && (used != '0 || issue));
      if (flush_valid) begin
        cnt <= keep_flush;
      end else begin
        if (front_dropped) begin
          tail <= wrap_add(tail, int'(drop_retire));
          cnt  <= cnt - drop_retire + CW'(push);
        end else begin
          tail <= issue ? wrap_add(tail, 1) : tail;
          cnt  <= cnt - CW'(issue) + CW'(push);
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (push) begin
      addr_q[head] <= in_addr;
      bsn_q[head]  <= in_bsn;
    end
  end

endmodule
