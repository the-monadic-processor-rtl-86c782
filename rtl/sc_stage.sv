// sc_stage: synchronisation check.
//
// For a monadic instruction nothing is accessed and the token passes on.
// For a dyadic instruction the matching address c+r is formed and the
// presence bit there is read and written back in the same cycle: an empty
// slot becomes full and the instruction cannot proceed (sync-non-achieved);
// a full slot becomes empty and the instruction proceeds with its partner.
// sync-non-achieved is driven combinationally to the monadic queue (so a
// monadic token can be dequeued for IF1 at this clock edge) and registered,
// with the matching address, instruction and token, for the OM stage.
// The stage structure and signal follow the original design; only the basic dyadic
// matching function is built (no sticky or other Monsoon functions).
module sc_stage
  import monadic_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  if_sc_t in,
  output ctx_t   pb_addr,
  input  logic   pb_rdata,
  output logic   pb_we,
  output logic   pb_wdata,
  output logic   sna,
  output sc_om_t out
);
  logic dyadic;

  assign dyadic   = in.valid && (in.ins.mf == MF_DYADIC);
  assign pb_addr  = in.tok.ctx + in.ins.r;
  assign pb_we    = dyadic;
  assign pb_wdata = ~pb_rdata;
  assign sna      = dyadic && !pb_rdata;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out <= '0;
    end else begin
      out.valid <= in.valid;
      out.tok   <= in.tok;
      out.ins   <= in.ins;
      out.ma    <= pb_addr;
      out.sna   <= sna;
    end
  end
endmodule
