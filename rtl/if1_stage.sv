// if1_stage: the extra instruction fetch fed by the monadic queue.
//
// When sync-check finds a dyadic instruction that cannot proceed, the
// monadic queue dequeues a token at that clock edge and this stage latches
// it.  In the following cycle, in parallel with the operand-matching stage,
// it fetches the token's (monadic) instruction from the shared code memory
// and registers a complete operand packet (v, immediate) for the ALU and
// form-tag stage, filling the slot that would otherwise be a bubble.
// Input-to-output latency two clock edges, as for SC followed by OM.
module if1_stage
  import monadic_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  token_t in_tok,
  output ip_t    cm_addr,
  input  instr_t cm_data,
  output logic   pending,    // a token is latched and being fetched
  output logic   out_valid,
  output exec_t  out
);
  logic   tok_valid;
  token_t tok;

  assign cm_addr = tok.ip;
  assign pending = tok_valid;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      tok_valid <= 1'b0;
      tok       <= '0;
      out_valid <= 1'b0;
      out       <= '0;
    end else begin
      tok_valid <= in_valid;
      tok       <= in_tok;
      out_valid <= tok_valid;
      out       <= make_exec(cm_data, tok.ctx, tok.value, sext_imm(cm_data.imm));
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) tok_valid |-> cm_data.mf == MF_MONADIC)
    else $error("if1_stage: token from the monadic queue addresses a dyadic instruction");
endmodule
