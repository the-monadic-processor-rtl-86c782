// tb_form_token: random ALU results and tags; the two new tokens must be
// <c.s'_p, v'> and <c.s''_p, v'> with the tags' S bits, valid only when the
// ALU slot is valid and the tag is present; OUT results must appear on the
// host output.
module tb_form_token;
  import monadic_pkg::*;

  logic   alu_valid;
  data_t  result;
  tags_t  tags;
  logic   tok_valid [2];
  token_t tok [2];
  logic   tok_s [2];
  logic   out_valid;
  ctx_t   out_ctx;
  data_t  out_value;

  form_token dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      alu_valid = ($urandom_range(0, 5) != 0);
      result    = $urandom;
      tags.ctx  = ctx_t'($urandom);
      tags.d1   = '{ip: ip_t'($urandom), port: 1'($urandom)};
      tags.d2   = '{ip: ip_t'($urandom), port: 1'($urandom)};
      {tags.t1v, tags.t2v, tags.s1, tags.s2, tags.out} = 5'($urandom);
      #1;
      check(tok_valid[0] == (alu_valid && tags.t1v) && tok_valid[1] == (alu_valid && tags.t2v),
            "token valid bits");
      check(tok[0].ctx == tags.ctx && tok[0].ip == tags.d1.ip && tok[0].port == tags.d1.port &&
            tok[0].value == result, "token 1 fields");
      check(tok[1].ctx == tags.ctx && tok[1].ip == tags.d2.ip && tok[1].port == tags.d2.port &&
            tok[1].value == result, "token 2 fields");
      check(tok_s[0] == tags.s1 && tok_s[1] == tags.s2, "S bits");
      check(out_valid == (alu_valid && tags.out) && (!out_valid || (out_ctx == tags.ctx && out_value == result)),
            "host output");
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
