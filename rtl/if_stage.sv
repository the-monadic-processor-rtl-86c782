// if_stage: instruction fetch.
//
// Each cycle the token chosen by token_select (dyadic queue first) addresses
// the code memory with its instruction pointer s; the instruction and the
// token are registered together and handed to the sync-check stage in the
// next cycle.  A cycle without a token registers an invalid slot.
// Latency one cycle, throughput one token per cycle (as in the original design).
module if_stage
  import monadic_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  token_t in_tok,
  output ip_t    cm_addr,
  input  instr_t cm_data,
  output if_sc_t out
);
  assign cm_addr = in_tok.ip;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out <= '0;
    end else begin
      out.valid <= in_valid;
      out.tok   <= in_tok;
      out.ins   <= cm_data;
    end
  end
endmodule
