// form_tag: computes the destination tags of the results, in parallel with
// the ALU.
//
// Each result tag is c.s_p: the context of the executing instruction with a
// destination address and port taken from the instruction, together with
// the destination's S bit (0 monadic, 1 dyadic) that selects the queue.
// Ordinary instructions send to every present destination; STEER sends only
// to destination 1 when v_r is non-zero and only to destination 2 otherwise;
// OUT forms no tag but marks the result for the host output.  STEER and OUT
// are this design's additions, needed to run loops and to return results.
// Latency one cycle, registered.
module form_tag
  import monadic_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  exec_t in,
  output tags_t out
);
  tags_t t;

  always_comb begin
    t.ctx = in.ctx;
    t.d1  = in.d1;
    t.d2  = in.d2;
    t.s1  = in.s1;
    t.s2  = in.s2;
    t.out = 1'b0;
    t.t1v = 1'b0;
    t.t2v = 1'b0;
    if (in_valid) begin
      unique case (in.op)
        OP_STEER: begin
          t.t1v = in.d1v && (in.vr != '0);
          t.t2v = in.d2v && (in.vr == '0);
        end
        OP_OUT:  t.out = 1'b1;
        default: begin
          t.t1v = in.d1v;
          t.t2v = in.d2v;
        end
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) out <= '0;
    else        out <= t;
  end
endmodule
