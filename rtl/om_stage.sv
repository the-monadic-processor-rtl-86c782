// om_stage: operand matching.
//
// Acts on the frame memory as the sync-check result dictates:
//   sync-non-achieved   store the token value at the matching address and
//                       emit nothing (IF1 fills the ALU slot instead);
//   dyadic, matched     read the partner and emit (v_l, v_r), ordered by the
//                       arriving token's port (port 0 is the left operand);
//   monadic             emit (v, immediate).
// The operand packet is registered for the ALU/form-tag stage.  Behaviour
// follows the original design; the immediate as second monadic operand is this
// design's choice.  Latency one cycle.
module om_stage
  import monadic_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  sc_om_t in,
  output ctx_t   fm_raddr,
  input  data_t  fm_rdata,
  output logic   fm_we,
  output ctx_t   fm_waddr,
  output data_t  fm_wdata,
  output logic   out_valid,
  output exec_t  out
);
  logic  emit;
  exec_t pkt;

  assign fm_raddr = in.ma;
  assign fm_waddr = in.ma;
  assign fm_wdata = in.tok.value;
  assign fm_we    = in.valid && in.sna;
  assign emit     = in.valid && !in.sna;

  always_comb begin
    if (in.ins.mf == MF_DYADIC) begin
      if (in.tok.port) pkt = make_exec(in.ins, in.tok.ctx, fm_rdata, in.tok.value);
      else             pkt = make_exec(in.ins, in.tok.ctx, in.tok.value, fm_rdata);
    end else begin
      pkt = make_exec(in.ins, in.tok.ctx, in.tok.value, sext_imm(in.ins.imm));
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out       <= '0;
    end else begin
      out_valid <= emit;
      out       <= pkt;
    end
  end
endmodule
