// tb_if1_stage: feeds monadic-queue tokens into the extra fetch stage with
// a code memory of monadic instructions modelled in the testbench, and
// checks that two clock edges later it delivers the operand packet
// (value, sign-extended immediate, destinations) of the fetched
// instruction, and nothing in cycles without a token.
module tb_if1_stage;
  import monadic_pkg::*;

  logic   clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  token_t in_tok = '0;
  ip_t    cm_addr;
  instr_t cm_data;
  logic   pending, out_valid;
  exec_t  out;

  if1_stage dut (.*);

  always #5 clk = ~clk;

  instr_t cmem [256];
  assign cm_data = cmem[cm_addr];

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit     v [2];
    token_t t [2];
    for (int a = 0; a < 256; a++) begin
      logic [63:0] b;
      b = {$urandom, $urandom};
      cmem[a] = instr_t'(b[$bits(instr_t)-1:0]);
      cmem[a].mf = MF_MONADIC;
    end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    v = '{0, 0};
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      if (i > 1) begin
        check(out_valid == v[1], $sformatf("out_valid two cycles later (cycle %0d)", i));
        check(pending == v[0], "pending one cycle later");
        if (v[1]) begin
          instr_t ins;
          ins = cmem[t[1].ip];
          check(out.op == ins.op && out.vl == t[1].value && out.ctx == t[1].ctx &&
                out.vr == {{(DATA_W-IMM_W){ins.imm[IMM_W-1]}}, ins.imm} &&
                out.d1 == ins.d1 && out.d2 == ins.d2 && out.d1v == ins.d1v &&
                out.d2v == ins.d2v && out.s1 == ins.s1 && out.s2 == ins.s2,
                $sformatf("operand packet (cycle %0d)", i));
        end
      end
      v[1] = v[0]; t[1] = t[0];
      in_valid = 1'($urandom);
      in_tok   = '{ctx: ctx_t'($urandom), ip: ip_t'($urandom), port: 1'b0, value: data_t'($urandom)};
      v[0] = in_valid; t[0] = in_tok;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
