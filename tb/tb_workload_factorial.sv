// tb_workload_factorial: the factorial benchmark at the problem sizes
// N = 2, 8, 32 and 128, one activation per run, on the processor at its
// default sizes.  The program is the iterative factorial graph of
// tb_monadic_pe (the processor has no function-call mechanism, so the
// recursive form cannot be run).  For every size the result must equal N!
// modulo 2**32, the run must end with both queues empty and no overflow,
// and the counters must satisfy ops_executed = ALU slots used + bubbles.
// Each run prints operations executed, bubbles and ALU utilisation
// (ops - bubbles) / ops, together with the number of sync-non-achieved
// events, i.e. the slots a plain ETS pipeline would have lost.
module tb_workload_factorial;
  import monadic_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        cm_we = 1'b0;
  ip_t         cm_waddr = '0;
  instr_t      cm_wdata = '0;
  logic        in_valid = 1'b0;
  token_t      in_tok = '0;
  logic        in_s = 1'b0;
  logic        in_ready;
  logic        out_valid;
  ctx_t        out_ctx;
  data_t       out_value;
  logic        busy;
  logic [31:0] ops_executed, bubbles, if1_fills;
  logic        m_overflow, d_overflow;

  monadic_pe dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic instr_t mk(op_t op, mf_t mf, int r, int imm,
                                int d1, bit p1, bit s1, bit d1v,
                                int d2, bit p2, bit s2, bit d2v);
    instr_t i;
    i.op  = op;   i.mf  = mf;  i.r = ctx_t'(r); i.imm = IMM_W'(imm);
    i.d1  = '{ip: ip_t'(d1), port: p1}; i.d2 = '{ip: ip_t'(d2), port: p2};
    i.d1v = d1v;  i.d2v = d2v; i.s1 = s1; i.s2 = s2;
    return i;
  endfunction

  task automatic load(input int a, input instr_t i);
    @(negedge clk);
    cm_we = 1'b1; cm_waddr = ip_t'(a); cm_wdata = i;
    @(negedge clk);
    cm_we = 1'b0;
  endtask

  task automatic inject(input int ip, input int value, input bit s);
    @(negedge clk);
    in_valid = 1'b1;
    in_tok   = '{ctx: '0, ip: ip_t'(ip), port: 1'b0, value: data_t'(value)};
    in_s     = s;
    #1;
    while (!in_ready) begin
      @(negedge clk);
      #1;
    end
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  int    n_sna, n_alu, n_out;
  data_t result;
  always @(posedge clk) if (rst_n) begin
    if (dut.sna) n_sna++;
    if (dut.om_valid || dut.if1_valid) n_alu++;
  end
  always @(negedge clk) if (rst_n && out_valid) begin
    n_out++;
    result = out_value;
  end

  function automatic data_t fact(int n);
    data_t f = 1;
    for (int i = 2; i <= n; i++) f = f * data_t'(i);
    return f;
  endfunction

  int sizes [4] = '{2, 8, 32, 128};

  initial begin
    load(0, mk(OP_ID,    MF_MONADIC, 0, 0, 1, 0, 0, 1, 2, 0, 1, 1));
    load(1, mk(OP_GT,    MF_MONADIC, 0, 0, 2, 1, 1, 1, 3, 1, 1, 1));
    load(2, mk(OP_STEER, MF_DYADIC,  0, 0, 4, 0, 0, 1, 0, 0, 0, 0));
    load(3, mk(OP_STEER, MF_DYADIC,  1, 0, 6, 0, 1, 1, 7, 0, 0, 1));
    load(4, mk(OP_ID,    MF_MONADIC, 0, 0, 6, 1, 1, 1, 5, 0, 0, 1));
    load(5, mk(OP_SUB,   MF_MONADIC, 0, 1, 8, 0, 1, 1, 0, 0, 0, 0));
    load(6, mk(OP_MUL,   MF_DYADIC,  2, 0, 3, 0, 1, 1, 8, 1, 1, 1));
    load(7, mk(OP_OUT,   MF_MONADIC, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0));
    load(8, mk(OP_ID,    MF_DYADIC,  3, 0, 0, 0, 0, 1, 0, 0, 0, 0));

    foreach (sizes[k]) begin
      // reset clears the queues, presence bits and counters; the code
      // memory keeps the program
      @(negedge clk);
      rst_n = 1'b0;
      repeat (2) @(negedge clk);
      rst_n = 1'b1;
      n_sna = 0; n_alu = 0; n_out = 0;
      inject(3, 1, 1'b1);             // acc = 1 -> STA.l
      inject(0, sizes[k], 1'b0);      // n -> FORKN
      do @(negedge clk); while (busy);
      @(negedge clk);
      check(n_out == 1, $sformatf("N=%0d: one result", sizes[k]));
      check(result == fact(sizes[k]), $sformatf("N=%0d: result %0d, expected %0d", sizes[k], result, fact(sizes[k])));
      check(!m_overflow && !d_overflow, $sformatf("N=%0d: no overflow", sizes[k]));
      check(ops_executed == 32'(n_alu) + bubbles, $sformatf("N=%0d: ops = ALU slots + bubbles", sizes[k]));
      check(32'(n_sna) == bubbles + if1_fills, $sformatf("N=%0d: each sync-non-achieved is filled or a bubble", sizes[k]));
      $display("N=%0d ops_executed=%0d bubbles=%0d if1_fills=%0d sync_non_achieved=%0d utilisation=%0.1f%%",
               sizes[k], ops_executed, bubbles, if1_fills, n_sna,
               100.0 * real'(ops_executed - bubbles) / real'(ops_executed));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
