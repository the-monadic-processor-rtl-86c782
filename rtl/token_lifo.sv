// token_lifo: last-in first-out token queue, used for both the monadic
// (low-priority) and the dyadic (high-priority) queue of the processor.
//
// The queue is a register array with a stack pointer.  Each cycle it accepts
// 0, 1 or 2 pushes (the form-token stage may produce two tokens for the same
// queue) and 0, 1 or 2 pops (on the monadic queue the IF and IF1 stages may
// both dequeue in one cycle).  'top' is the most recently pushed token and
// 'next' the one below it; both are read combinationally and popped at the
// clock edge.  Pops are applied before pushes, so pushed tokens land above
// whatever remains.  push_tok[0] is pushed first, push_tok[1] ends on top.
// The LIFO policy follows the original design; depth, dual ports and the overflow
// behaviour (tokens that do not fit are dropped and a sticky flag is set)
// are this design's choices.  The caller must not pop more than 'count'.
module token_lifo
  import monadic_pkg::*;
#(
  parameter int unsigned DEPTH = 32
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [1:0]                 push_n,
  input  token_t                     push_tok [2],
  input  logic [1:0]                 pop_n,
  output token_t                     top,
  output token_t                     next,
  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic                       overflow
);
  localparam int unsigned CW = $clog2(DEPTH+1);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  token_t mem [DEPTH];
  logic [CW-1:0] sp;   // number of tokens held

  assign count = sp;
  logic [CW-1:0] i_top, i_next;
  assign i_top  = sp - CW'(1);
  assign i_next = sp - CW'(2);
  assign top    = (sp >= CW'(1)) ? mem[i_top[AW-1:0]]  : '0;
  assign next   = (sp >= CW'(2)) ? mem[i_next[AW-1:0]] : '0;

  logic [CW:0] base;   // stack height after the pops
  always_comb base = {1'b0, sp} - {{(CW-1){1'b0}}, pop_n};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sp       <= '0;
      overflow <= 1'b0;
    end else begin
      logic [CW:0] h;
      h = base;
      for (int i = 0; i < 2; i++) begin
        if (i < int'(push_n)) begin
          if (h < (CW+1)'(DEPTH)) begin
            mem[h[AW-1:0]] <= push_tok[i];
            h = h + 1'b1;
          end else begin
            overflow <= 1'b1;
          end
        end
      end
      sp <= h[CW-1:0];
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) pop_n <= 2'd2 && 32'(pop_n) <= 32'(sp))
    else $error("token_lifo: pop of %0d from a queue holding %0d", pop_n, sp);

endmodule
