// tb_token_select: exhaustive test of the queue selection for the IF and
// IF1 stages over every combination of dyadic-queue state, monadic
// occupancy (0, 1, 2 or more) and sync-non-achieved, with random tokens.
// Expected: IF takes the dyadic top if any, else a monadic token; IF1 takes
// the monadic top on sync-non-achieved; IF then takes the next one.
module tb_token_select;
  import monadic_pkg::*;

  logic       d_nonempty, sna;
  logic [1:0] m_avail;
  token_t     d_top, m_top, m_next;
  logic       if_valid, if1_valid, d_pop;
  token_t     if_tok, if1_tok;
  logic [1:0] m_pop_n;

  token_select dut (.*);

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
    for (int rep = 0; rep < 20; rep++)
      for (int d = 0; d < 2; d++)
        for (int m = 0; m < 3; m++)
          for (int s = 0; s < 2; s++) begin
            bit     e_if, e_if1, e_dpop;
            int     e_mpop;
            token_t e_if_tok, e_if1_tok;
            d_nonempty = 1'(d); m_avail = 2'(m); sna = 1'(s);
            d_top  = '{ctx: ctx_t'($urandom), ip: ip_t'($urandom), port: 1'($urandom), value: data_t'($urandom)};
            m_top  = '{ctx: ctx_t'($urandom), ip: ip_t'($urandom), port: 1'b0, value: data_t'($urandom)};
            m_next = '{ctx: ctx_t'($urandom), ip: ip_t'($urandom), port: 1'b0, value: data_t'($urandom)};
            #1;
            e_if1 = s && m > 0;  e_if1_tok = m_top;
            e_mpop = e_if1 ? 1 : 0;
            e_dpop = d;
            if (d) begin e_if = 1; e_if_tok = d_top; end
            else if (e_if1) begin e_if = (m == 2); e_if_tok = m_next; e_mpop += e_if ? 1 : 0; end
            else begin e_if = (m > 0); e_if_tok = m_top; e_mpop += e_if ? 1 : 0; end
            check(if_valid == e_if && if1_valid == e_if1 && d_pop == e_dpop && int'(m_pop_n) == e_mpop,
                  $sformatf("d=%0d m=%0d sna=%0d: if=%0d if1=%0d dpop=%0d mpop=%0d", d, m, s,
                            if_valid, if1_valid, d_pop, m_pop_n));
            if (e_if)  check(if_tok == e_if_tok, "IF token");
            if (e_if1) check(if1_tok == e_if1_tok, "IF1 token");
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
