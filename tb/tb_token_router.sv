// tb_token_router: random new tokens with random S bits plus host tokens;
// each queue must receive exactly its tokens, in order, and the host token
// must be accepted exactly when its queue gets fewer than two tokens.
module tb_token_router;
  import monadic_pkg::*;

  logic       ft_valid [2];
  token_t     ft_tok [2];
  logic       ft_s [2];
  logic       host_valid, host_s, host_ready;
  token_t     host_tok;
  logic [1:0] m_push_n, d_push_n;
  token_t     m_push_tok [2];
  token_t     d_push_tok [2];

  token_router dut (.*);

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

  function automatic token_t rnd_tok();
    return '{ctx: ctx_t'($urandom), ip: ip_t'($urandom), port: 1'($urandom), value: data_t'($urandom)};
  endfunction

  initial begin
    int n_refused = 0;
    for (int i = 0; i < 3000; i++) begin
      token_t mq [$], dq [$];
      bit     e_ready;
      mq.delete();
      dq.delete();
      for (int k = 0; k < 2; k++) begin
        ft_valid[k] = 1'($urandom); ft_s[k] = 1'($urandom); ft_tok[k] = rnd_tok();
        if (ft_valid[k]) begin
          if (ft_s[k]) dq.push_back(ft_tok[k]); else mq.push_back(ft_tok[k]);
        end
      end
      host_valid = 1'($urandom); host_s = 1'($urandom); host_tok = rnd_tok();
      e_ready = host_s ? (dq.size() < 2) : (mq.size() < 2);
      if (host_valid && e_ready) begin
        if (host_s) dq.push_back(host_tok); else mq.push_back(host_tok);
      end
      if (host_valid && !e_ready) n_refused++;
      #1;
      check(host_ready == e_ready, "host_ready");
      check(int'(m_push_n) == mq.size() && int'(d_push_n) == dq.size(), $sformatf("push counts m=%0d d=%0d exp %0d %0d v=%0d%0d s=%0d%0d h=%0d%0d", m_push_n, d_push_n, mq.size(), dq.size(), ft_valid[0], ft_valid[1], ft_s[0], ft_s[1], host_valid, host_s));
      for (int k = 0; k < mq.size(); k++) check(m_push_tok[k] == mq[k], "monadic queue token");
      for (int k = 0; k < dq.size(); k++) check(d_push_tok[k] == dq[k], "dyadic queue token");
      #1;
    end
    check(n_refused > 0, "host refusal exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
