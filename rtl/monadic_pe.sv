// monadic_pe: the Monadic dataflow processor element.
//
// An Explicit Token Store processor whose circular pipeline has five stages:
//   IF    instruction fetch of the token chosen from the two LIFO queues
//         (dyadic queue first, monadic queue only when it is empty);
//   SC    synchronisation check on the presence bits at c+r;
//   OM    operand matching on the frame memory, in parallel with
//   IF1   an extra instruction fetch for a monadic-queue token;
//   FTA   ALU in parallel with form-tag;
//   FT    form-token, writing 0..2 new tokens into the queues by their S bit.
// When SC finds that a dyadic instruction's partner has not arrived it
// raises sync-non-achieved: OM parks the value in the frame memory and emits
// nothing, and the monadic queue hands its top token to IF1, which delivers
// a ready operand packet into the ALU slot OM left empty.  Only when the
// monadic queue is empty is that slot lost (a bubble).
//
// Host interface: the code memory is loaded through cm_*; initial tokens
// enter through in_* (in_s = 1 for a dyadic destination) when in_ready; the
// results of OUT instructions appear on out_* for one cycle.  busy is high
// while any token is queued or in flight.  ops_executed counts ALU slots
// used plus bubbles, bubbles the slots lost, if1_fills the slots IF1 filled;
// ALU utilisation is (ops_executed - bubbles) / ops_executed.
//
// Timing: the token popped at edge k is fetched by IF before that edge
// (the IF register loads at k), checked by SC before k+1, matched by OM
// before k+2, executed by the ALU and form-tag before k+3, and its results
// are pushed into the queues at edge k+4.  A monadic token popped on
// sync-non-achieved (at k+1) is fetched by IF1 before k+2, in the slot OM
// leaves empty.  One token enters IF per cycle.  The stage structure, the two queues, their priority, the
// LIFO order and the sync-non-achieved path follow the original design; widths,
// queue depths, instruction set, host ports and counters are this design's.
module monadic_pe
  import monadic_pkg::*;
#(
  parameter int unsigned MQ_DEPTH = 32,
  parameter int unsigned DQ_DEPTH = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  // program load
  input  logic         cm_we,
  input  ip_t          cm_waddr,
  input  instr_t       cm_wdata,
  // host tokens in
  input  logic         in_valid,
  input  token_t       in_tok,
  input  logic         in_s,
  output logic         in_ready,
  // results out
  output logic         out_valid,
  output ctx_t         out_ctx,
  output data_t        out_value,
  // status
  output logic         busy,
  output logic [31:0]  ops_executed,
  output logic [31:0]  bubbles,
  output logic [31:0]  if1_fills,
  output logic         m_overflow,
  output logic         d_overflow
);
  // ---------------- token queues ----------------
  logic [1:0] m_push_n, d_push_n, m_pop_n;
  token_t     m_push_tok [2];
  token_t     d_push_tok [2];
  token_t     m_top, m_next, d_top, d_next;
  logic [$clog2(MQ_DEPTH+1)-1:0] m_count;
  logic [$clog2(DQ_DEPTH+1)-1:0] d_count;
  logic       d_pop;

  token_lifo #(.DEPTH(MQ_DEPTH)) u_mq (
    .clk, .rst_n, .push_n(m_push_n), .push_tok(m_push_tok), .pop_n(m_pop_n),
    .top(m_top), .next(m_next), .count(m_count), .overflow(m_overflow));

  token_lifo #(.DEPTH(DQ_DEPTH)) u_dq (
    .clk, .rst_n, .push_n(d_push_n), .push_tok(d_push_tok), .pop_n({1'b0, d_pop}),
    .top(d_top), .next(d_next), .count(d_count), .overflow(d_overflow));

  // ---------------- selection for IF and IF1 ----------------
  logic       sna;
  logic       sel_if_valid, sel_if1_valid;
  token_t     sel_if_tok, sel_if1_tok;
  logic [1:0] m_avail;

  assign m_avail = (m_count >= 2) ? 2'd2 : 2'(m_count);

  token_select u_sel (
    .d_nonempty(d_count != '0), .d_top, .m_avail, .m_top, .m_next, .sna,
    .if_valid(sel_if_valid), .if_tok(sel_if_tok),
    .if1_valid(sel_if1_valid), .if1_tok(sel_if1_tok),
    .d_pop, .m_pop_n);

  // ---------------- code memory, IF ----------------
  ip_t    cm_addr_a, cm_addr_b;
  instr_t cm_data_a, cm_data_b;
  if_sc_t if_sc;

  code_memory u_cm (
    .clk, .we(cm_we), .waddr(cm_waddr), .wdata(cm_wdata),
    .raddr_a(cm_addr_a), .rdata_a(cm_data_a),
    .raddr_b(cm_addr_b), .rdata_b(cm_data_b));

  if_stage u_if (
    .clk, .rst_n, .in_valid(sel_if_valid), .in_tok(sel_if_tok),
    .cm_addr(cm_addr_a), .cm_data(cm_data_a), .out(if_sc));

  // ---------------- SC with presence bits ----------------
  ctx_t   pb_addr;
  logic   pb_rdata, pb_we, pb_wdata;
  sc_om_t sc_om;

  presence_memory #(.AW(CTX_W)) u_pb (
    .clk, .rst_n, .raddr(pb_addr), .rdata(pb_rdata),
    .we(pb_we), .waddr(pb_addr), .wdata(pb_wdata));

  sc_stage u_sc (
    .clk, .rst_n, .in(if_sc), .pb_addr, .pb_rdata, .pb_we, .pb_wdata,
    .sna, .out(sc_om));

  // ---------------- OM with frame memory, IF1 in parallel ----------------
  ctx_t  fm_raddr, fm_waddr;
  data_t fm_rdata, fm_wdata;
  logic  fm_we;
  logic  om_valid, if1_valid, if1_pending;
  exec_t om_out, if1_out;

  frame_memory #(.AW(CTX_W), .DW(DATA_W)) u_fm (
    .clk, .raddr(fm_raddr), .rdata(fm_rdata),
    .we(fm_we), .waddr(fm_waddr), .wdata(fm_wdata));

  om_stage u_om (
    .clk, .rst_n, .in(sc_om), .fm_raddr, .fm_rdata, .fm_we, .fm_waddr, .fm_wdata,
    .out_valid(om_valid), .out(om_out));

  if1_stage u_if1 (
    .clk, .rst_n, .in_valid(sel_if1_valid), .in_tok(sel_if1_tok),
    .cm_addr(cm_addr_b), .cm_data(cm_data_b),
    .pending(if1_pending), .out_valid(if1_valid), .out(if1_out));

  // OM and IF1 never deliver in the same cycle: IF1 only runs when OM has
  // been told sync-non-achieved.
  logic  ex_valid;
  exec_t ex;

  assign ex_valid = om_valid || if1_valid;
  assign ex       = if1_valid ? if1_out : om_out;

  assert property (@(posedge clk) disable iff (!rst_n) !(om_valid && if1_valid))
    else $error("monadic_pe: OM and IF1 both delivered operands");

  // ---------------- FTA: ALU and form-tag ----------------
  logic  alu_valid;
  data_t alu_result;
  tags_t tags;

  alu u_alu (
    .clk, .rst_n, .in_valid(ex_valid), .op(ex.op), .vl(ex.vl), .vr(ex.vr),
    .out_valid(alu_valid), .result(alu_result));

  form_tag u_ftag (.clk, .rst_n, .in_valid(ex_valid), .in(ex), .out(tags));

  // ---------------- FT and the write back into the queues ----------------
  logic   ft_valid [2];
  token_t ft_tok   [2];
  logic   ft_s     [2];

  form_token u_ft (
    .alu_valid, .result(alu_result), .tags,
    .tok_valid(ft_valid), .tok(ft_tok), .tok_s(ft_s),
    .out_valid, .out_ctx, .out_value);

  token_router u_rt (
    .ft_valid, .ft_tok, .ft_s,
    .host_valid(in_valid), .host_tok(in_tok), .host_s(in_s), .host_ready(in_ready),
    .m_push_n, .m_push_tok, .d_push_n, .d_push_tok);

  // ---------------- status and utilisation counters ----------------
  logic bubble_now;
  assign bubble_now = sna && !sel_if1_valid;

  assign busy = (m_count != '0) || (d_count != '0) || if_sc.valid || sc_om.valid ||
                if1_pending || om_valid || if1_valid || alu_valid;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ops_executed <= '0;
      bubbles      <= '0;
      if1_fills    <= '0;
    end else begin
      ops_executed <= ops_executed + 32'(ex_valid) + 32'(bubble_now);
      bubbles      <= bubbles + 32'(bubble_now);
      if1_fills    <= if1_fills + 32'(sel_if1_valid);
    end
  end
endmodule
