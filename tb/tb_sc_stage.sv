// tb_sc_stage: drives random monadic and dyadic instructions on a few
// contexts and offsets (so slots are hit repeatedly) into the sync-check
// stage, with the presence bits modelled in the testbench.  For a dyadic
// instruction the first arrival at c+r must raise sync-non-achieved and set
// the bit, the second must clear it and proceed; a monadic instruction must
// leave the bits alone.  The registered output must carry the matching
// address and the flag one cycle later.
module tb_sc_stage;
  import monadic_pkg::*;

  logic   clk = 1'b0, rst_n = 1'b0;
  if_sc_t in = '0;
  ctx_t   pb_addr;
  logic   pb_rdata, pb_we, pb_wdata, sna;
  sc_om_t out;

  sc_stage dut (.*);

  always #5 clk = ~clk;

  logic pbits [256];
  assign pb_rdata = pbits[pb_addr];
  always @(posedge clk) if (pb_we) pbits[pb_addr] <= pb_wdata;

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

  bit model [256];
  int n_sna = 0, n_match = 0;

  initial begin
    bit   pv, psna;
    ctx_t pma;
    for (int a = 0; a < 256; a++) begin pbits[a] = 0; model[a] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    pv = 0; psna = 0; pma = '0;
    for (int i = 0; i < 2000; i++) begin
      bit   e_sna;
      ctx_t ma;
      @(negedge clk);
      if (i > 0) begin
        check(out.valid == pv, "valid delayed");
        if (pv) check(out.sna == psna && out.ma == pma, $sformatf("registered sna/ma (cycle %0d)", i));
      end
      in.valid     = ($urandom_range(0, 4) != 0);
      in.tok       = '{ctx: ctx_t'($urandom_range(250, 255)), ip: ip_t'($urandom), port: 1'($urandom), value: data_t'($urandom)};
      in.ins       = '0;
      in.ins.mf    = ($urandom_range(0, 2) != 0) ? MF_DYADIC : MF_MONADIC;
      in.ins.r     = ctx_t'($urandom_range(0, 7));
      ma = in.tok.ctx + in.ins.r;    // wraps modulo 256
      e_sna = 0;
      if (in.valid && in.ins.mf == MF_DYADIC) begin
        e_sna = !model[ma];
        model[ma] = !model[ma];
        if (e_sna) n_sna++; else n_match++;
      end
      #1;
      check(sna == e_sna, $sformatf("sna at c=%0d r=%0d", in.tok.ctx, in.ins.r));
      check(pb_we == (in.valid && in.ins.mf == MF_DYADIC), "presence write only for dyadic");
      pv = in.valid; psna = e_sna; pma = ma;
    end
    check(n_sna > 0 && n_match > 0, "both outcomes exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
