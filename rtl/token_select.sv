// token_select: the merge point in front of the two fetch stages.
//
// The IF stage takes one token per cycle from the dyadic (high-priority)
// queue, and from the monadic (low-priority) queue only when the dyadic queue
// is empty.  When the sync-check stage signals sync-non-achieved, the monadic
// queue also hands its top token to the IF1 stage in the same cycle, so that
// IF1 can fill the ALU slot that the unmatched dyadic token leaves empty.  If
// both want a monadic token, IF1 gets the top and IF the one below it; with a
// single monadic token IF1 wins and IF idles.  The priority rule is the
// document's; the tie-break is this design's choice.  Purely combinational:
// the outputs are the pop counts applied at the next clock edge and the
// tokens the fetch stages latch at that edge.
module token_select
  import monadic_pkg::*;
(
  input  logic       d_nonempty,
  input  token_t     d_top,
  input  logic [1:0] m_avail,     // monadic occupancy, saturated at 2
  input  token_t     m_top,
  input  token_t     m_next,
  input  logic       sna,         // sync-non-achieved from SC
  output logic       if_valid,
  output token_t     if_tok,
  output logic       if1_valid,
  output token_t     if1_tok,
  output logic       d_pop,
  output logic [1:0] m_pop_n
);
  always_comb begin
    if_valid  = 1'b0;
    if_tok    = '0;
    if1_valid = 1'b0;
    if1_tok   = '0;
    d_pop     = 1'b0;
    m_pop_n   = 2'd0;
    // IF1: fed only on sync-non-achieved, from the top of the monadic queue
    if (sna && m_avail != 2'd0) begin
      if1_valid = 1'b1;
      if1_tok   = m_top;
      m_pop_n   = 2'd1;
    end
    // IF: dyadic queue first
    if (d_nonempty) begin
      if_valid = 1'b1;
      if_tok   = d_top;
      d_pop    = 1'b1;
    end else if (if1_valid) begin
      if (m_avail == 2'd2) begin
        if_valid = 1'b1;
        if_tok   = m_next;
        m_pop_n  = 2'd2;
      end
    end else if (m_avail != 2'd0) begin
      if_valid = 1'b1;
      if_tok   = m_top;
      m_pop_n  = 2'd1;
    end
  end
endmodule
