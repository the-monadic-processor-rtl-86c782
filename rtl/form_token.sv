// form_token: builds the new tokens.
//
// Concatenates each valid destination tag from form_tag with the ALU result
// v' into a token <c.s_p, v'> and passes on the tag's S bit, which routes
// the token to the dyadic (S=1) or monadic (S=0) queue.  Zero, one or two
// tokens per cycle.  An OUT result goes to the host output instead.
// Combinational: the queues' write at the end of this cycle completes the
// stage.  Follows the original design apart from the host output.
module form_token
  import monadic_pkg::*;
(
  input  logic   alu_valid,
  input  data_t  result,
  input  tags_t  tags,
  output logic   tok_valid [2],
  output token_t tok       [2],
  output logic   tok_s     [2],
  output logic   out_valid,
  output ctx_t   out_ctx,
  output data_t  out_value
);
  always_comb begin
    tok_valid[0] = alu_valid && tags.t1v;
    tok_valid[1] = alu_valid && tags.t2v;
    tok[0]       = '{ctx: tags.ctx, ip: tags.d1.ip, port: tags.d1.port, value: result};
    tok[1]       = '{ctx: tags.ctx, ip: tags.d2.ip, port: tags.d2.port, value: result};
    tok_s[0]     = tags.s1;
    tok_s[1]     = tags.s2;
    out_valid    = alu_valid && tags.out;
    out_ctx      = tags.ctx;
    out_value    = result;
  end
endmodule
