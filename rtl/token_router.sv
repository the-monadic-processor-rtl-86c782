// token_router: the split point that writes new tokens into the queues.
//
// Each token from the form-token stage goes to the dyadic queue when its S
// bit is 1 and to the monadic queue when it is 0, preserving order (token 0
// is pushed first).  A token from the host enters by the same rule, after
// the form-token stage's tokens, and only when its queue receives fewer than
// two tokens in that cycle (host_ready).  The routing rule is the original design's;
// the host port is this design's addition.  Combinational.
module token_router
  import monadic_pkg::*;
(
  input  logic       ft_valid [2],
  input  token_t     ft_tok   [2],
  input  logic       ft_s     [2],
  input  logic       host_valid,
  input  token_t     host_tok,
  input  logic       host_s,
  output logic       host_ready,
  output logic [1:0] m_push_n,
  output token_t     m_push_tok [2],
  output logic [1:0] d_push_n,
  output token_t     d_push_tok [2]
);
  always_comb begin
    logic [1:0] m, d;
    m = 2'd0;
    d = 2'd0;
    m_push_tok = '{default: '0};
    d_push_tok = '{default: '0};
    for (int i = 0; i < 2; i++) begin
      if (ft_valid[i]) begin
        if (ft_s[i]) begin
          d_push_tok[d[0]] = ft_tok[i];
          d = d + 2'd1;
        end else begin
          m_push_tok[m[0]] = ft_tok[i];
          m = m + 2'd1;
        end
      end
    end
    host_ready = host_s ? (d != 2'd2) : (m != 2'd2);
    if (host_valid && host_ready) begin
      if (host_s) begin
        d_push_tok[d[0]] = host_tok;
        d = d + 2'd1;
      end else begin
        m_push_tok[m[0]] = host_tok;
        m = m + 2'd1;
      end
    end
    m_push_n = m;
    d_push_n = d;
  end
endmodule
