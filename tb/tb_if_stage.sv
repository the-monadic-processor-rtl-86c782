// tb_if_stage: drives random tokens (some cycles empty) into the fetch
// stage with a code memory modelled in the testbench, and checks that one
// cycle later the stage presents the same token together with the
// instruction stored at the token's instruction address.
module tb_if_stage;
  import monadic_pkg::*;

  logic   clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  token_t in_tok = '0;
  ip_t    cm_addr;
  instr_t cm_data;
  if_sc_t out;

  if_stage dut (.*);

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
    logic   pv;
    token_t pt;
    for (int a = 0; a < 256; a++) begin
      logic [63:0] b;
      b = {$urandom, $urandom};
      cmem[a] = instr_t'(b[$bits(instr_t)-1:0]);
    end
    repeat (2) @(negedge clk);
    check(out.valid == 1'b0, "reset clears the stage");
    rst_n = 1'b1;
    pv = 0; pt = '0;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      if (i > 0) begin
        check(out.valid == pv, "valid delayed one cycle");
        if (pv) check(out.tok == pt && out.ins == cmem[pt.ip], $sformatf("token and its instruction ip=%0d got %h exp %h tok %h exp %h", pt.ip, out.ins, cmem[pt.ip], out.tok, pt));
      end
      in_valid = 1'($urandom);
      in_tok   = '{ctx: ctx_t'($urandom), ip: ip_t'($urandom), port: 1'($urandom), value: data_t'($urandom)};
      pv = in_valid; pt = in_tok;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
