// tb_om_stage: drives sync-check results into the operand-matching stage
// with the frame memory modelled in the testbench.  A sync-non-achieved
// token must be stored at its matching address and produce nothing; a
// matched dyadic token must produce its value and the stored partner in
// port order (port 0 left); a monadic token must produce its value and the
// sign-extended immediate.  Instruction fields must pass to the packet.
module tb_om_stage;
  import monadic_pkg::*;

  logic   clk = 1'b0, rst_n = 1'b0;
  sc_om_t in = '0;
  ctx_t   fm_raddr, fm_waddr;
  data_t  fm_rdata, fm_wdata;
  logic   fm_we, out_valid;
  exec_t  out;

  om_stage dut (.*);

  always #5 clk = ~clk;

  data_t fmem [256];
  assign fm_rdata = fmem[fm_raddr];
  always @(posedge clk) if (fm_we) fmem[fm_waddr] <= fm_wdata;

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

  data_t model [256];
  bit    full  [256];

  initial begin
    bit    pv;
    exec_t pe;
    int    n_store = 0, n_pair = 0, n_mon = 0;
    for (int a = 0; a < 256; a++) begin fmem[a] = '0; model[a] = '0; full[a] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    pv = 0; pe = '0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      if (i > 0) begin
        check(out_valid == pv, $sformatf("out_valid (cycle %0d)", i));
        if (pv) check(out == pe, $sformatf("operand packet (cycle %0d)", i));
      end
      in        = '0;
      in.valid  = ($urandom_range(0, 4) != 0);
      in.tok    = '{ctx: ctx_t'($urandom), ip: ip_t'($urandom), port: 1'($urandom), value: data_t'($urandom)};
      in.ins.op = op_t'($urandom_range(0, 11));
      in.ins.mf = ($urandom_range(0, 2) != 0) ? MF_DYADIC : MF_MONADIC;
      in.ins.imm = IMM_W'($urandom);
      in.ins.d1 = '{ip: ip_t'($urandom), port: 1'($urandom)};
      in.ins.d2 = '{ip: ip_t'($urandom), port: 1'($urandom)};
      {in.ins.d1v, in.ins.d2v, in.ins.s1, in.ins.s2} = 4'($urandom);
      in.ma     = ctx_t'($urandom_range(0, 15));
      in.sna    = (in.ins.mf == MF_DYADIC) && !full[in.ma];
      pv = 0;
      if (in.valid) begin
        if (in.sna) begin
          model[in.ma] = in.tok.value; full[in.ma] = 1; n_store++;
        end else if (in.ins.mf == MF_DYADIC) begin
          pv = 1; full[in.ma] = 0; n_pair++;
          pe = '{op: in.ins.op, vl: in.tok.port ? model[in.ma] : in.tok.value,
                 vr: in.tok.port ? in.tok.value : model[in.ma], ctx: in.tok.ctx,
                 d1: in.ins.d1, d2: in.ins.d2, d1v: in.ins.d1v, d2v: in.ins.d2v,
                 s1: in.ins.s1, s2: in.ins.s2};
        end else begin
          pv = 1; n_mon++;
          pe = '{op: in.ins.op, vl: in.tok.value,
                 vr: {{(DATA_W-IMM_W){in.ins.imm[IMM_W-1]}}, in.ins.imm}, ctx: in.tok.ctx,
                 d1: in.ins.d1, d2: in.ins.d2, d1v: in.ins.d1v, d2v: in.ins.d2v,
                 s1: in.ins.s1, s2: in.ins.s2};
        end
      end
    end
    check(n_store > 0 && n_pair > 0 && n_mon > 0, "store, pair and monadic cases exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
