// alu: the arithmetic-logic unit of the ALU/form-tag (FTA) stage.
//
// Computes v' = op(v_l, v_r) and registers it with a valid bit; a cycle
// without operands (a bubble) registers an invalid result.  The opcode set
// is this design's choice: the only operation the original design names is the
// identity.  STEER and OUT pass v_l; their routing is done by form_tag.
// Comparisons are signed and return 1 or 0.  Latency one cycle.
module alu
  import monadic_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  op_t   op,
  input  data_t vl,
  input  data_t vr,
  output logic  out_valid,
  output data_t result
);
  data_t r;

  always_comb begin
    unique case (op)
      OP_ADD:  r = vl + vr;
      OP_SUB:  r = vl - vr;
      OP_MUL:  r = vl * vr;
      OP_AND:  r = vl & vr;
      OP_OR:   r = vl | vr;
      OP_XOR:  r = vl ^ vr;
      OP_LT:   r = data_t'($signed(vl) < $signed(vr));
      OP_GT:   r = data_t'($signed(vl) > $signed(vr));
      OP_EQ:   r = data_t'(vl == vr);
      default: r = vl;   // OP_ID, OP_STEER, OP_OUT
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      result    <= '0;
    end else begin
      out_valid <= in_valid;
      result    <= r;
    end
  end
endmodule
