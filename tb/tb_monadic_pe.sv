// tb_monadic_pe: end-to-end test of the Monadic processor element at its
// default sizes.
//
// Phase 1 measures the pipeline latency: a single token bound for an OUT
// instruction must appear on the output 4 cycles after the edge that puts it
// in the queue (IF, SC, OM, ALU/form-tag).
// Phase 2 loads an iterative factorial dataflow graph (9 instructions, four
// dyadic rendezvous slots per activation frame) and runs NCTX independent
// activations in parallel, each in its own frame (context c = 4k) with its
// own n.  Every result is checked against n! computed here (mod 2**32).
// The graph, per activation:
//   0 FORKN  ID            n   -> CMP, STN.l
//   1 CMP    GT n,#0       c   -> STN.r, STA.r
//   2 STN    STEER (dyadic) n  -> FORK2 if c, else dropped
//   3 STA    STEER (dyadic) acc-> MUL.l if c, else OUT
//   4 FORK2  ID            n   -> MUL.r, DEC
//   5 DEC    SUB n,#1          -> GATE.l
//   6 MUL    MUL (dyadic)  acc*n -> STA.l, GATE.r
//   7 OUT    OUT               -> host
//   8 GATE   ID (dyadic)   n-1 -> FORKN   (waits for acc so iterations
//                                          never overtake each other)
// The run must exercise every mechanism of the design at least once:
// sync-non-achieved, IF1 fill-in from the monadic queue, a bubble, the
// dyadic queue winning over a non-empty monadic queue, two monadic pops in
// one cycle, two tokens pushed into one queue in one cycle.  The
// utilisation counters must agree with the testbench's own count, and IF
// must take a token in every cycle in which a queue holds one.
module tb_monadic_pe;
  import monadic_pkg::*;

  localparam int NCTX = 8;

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
  int cycles = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // watchdog
  initial begin
    repeat (200000) @(posedge clk);
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

  task automatic inject(input int ctx, input int ip, input bit port,
                        input int value, input bit s);
    @(negedge clk);
    in_valid = 1'b1;
    in_tok   = '{ctx: ctx_t'(ctx), ip: ip_t'(ip), port: port, value: data_t'(value)};
    in_s     = s;
    #1;                               // let in_ready settle
    while (!in_ready) begin
      @(negedge clk);
      #1;
    end
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  // mechanism and utilisation monitors
  int n_sna = 0, n_fill = 0, n_bubble = 0, n_dprio = 0, n_dualpop = 0;
  int n_dualpush = 0, n_alu = 0, n_rate_viol = 0;
  always @(posedge clk) if (rst_n) begin
    cycles++;
    if (dut.sna) n_sna++;
    if (dut.sel_if1_valid) n_fill++;
    if (dut.sna && !dut.sel_if1_valid) n_bubble++;
    if (dut.d_pop && dut.m_count != 0) n_dprio++;
    if (dut.m_pop_n == 2'd2) n_dualpop++;
    if (dut.m_push_n == 2'd2 || dut.d_push_n == 2'd2) n_dualpush++;
    if (dut.om_valid || dut.if1_valid) n_alu++;
    // one token enters IF every cycle while a queue holds one, unless IF1
    // took the only monadic token
    if ((dut.m_count != 0 || dut.d_count != 0) && !dut.sel_if_valid &&
        !(dut.d_count == 0 && dut.m_count == 1 && dut.sel_if1_valid)) n_rate_viol++;
  end

  function automatic data_t fact(int n);
    data_t f = 1;
    for (int i = 2; i <= n; i++) f = f * data_t'(i);
    return f;
  endfunction

  int     nval [NCTX];
  bit     got  [NCTX];
  int     lat;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // program
    load(0, mk(OP_ID,    MF_MONADIC, 0, 0, 1, 0, 0, 1, 2, 0, 1, 1));
    load(1, mk(OP_GT,    MF_MONADIC, 0, 0, 2, 1, 1, 1, 3, 1, 1, 1));
    load(2, mk(OP_STEER, MF_DYADIC,  0, 0, 4, 0, 0, 1, 0, 0, 0, 0));
    load(3, mk(OP_STEER, MF_DYADIC,  1, 0, 6, 0, 1, 1, 7, 0, 0, 1));
    load(4, mk(OP_ID,    MF_MONADIC, 0, 0, 6, 1, 1, 1, 5, 0, 0, 1));
    load(5, mk(OP_SUB,   MF_MONADIC, 0, 1, 8, 0, 1, 1, 0, 0, 0, 0));
    load(6, mk(OP_MUL,   MF_DYADIC,  2, 0, 3, 0, 1, 1, 8, 1, 1, 1));
    load(7, mk(OP_OUT,   MF_MONADIC, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0));
    load(8, mk(OP_ID,    MF_DYADIC,  3, 0, 0, 0, 0, 1, 0, 0, 0, 0));

    // phase 1: latency of one monadic token through the pipeline
    @(negedge clk);
    in_valid = 1'b1;
    in_tok   = '{ctx: ctx_t'(200), ip: ip_t'(7), port: 1'b0, value: data_t'(32'h1234_5678)};
    in_s     = 1'b0;
    @(negedge clk);            // accepted at the edge just passed
    in_valid = 1'b0;
    lat = 0;
    while (!out_valid && lat < 20) begin
      @(negedge clk);
      lat++;
    end
    check(lat == 4, $sformatf("pipeline latency %0d, expected 4", lat));
    check(out_value == 32'h1234_5678 && out_ctx == 8'd200, "OUT token value and context");
    @(negedge clk);

    // phase 2: NCTX factorials in parallel
    for (int k = 0; k < NCTX; k++) begin
      nval[k] = (k * 5) % 13;          // 0..12, n! fits 32 bits
      got[k]  = 1'b0;
    end
    for (int k = 0; k < NCTX; k++) begin
      inject(4*k, 3, 1'b0, 1, 1'b1);        // acc = 1 -> STA.l (dyadic)
      inject(4*k, 0, 1'b0, nval[k], 1'b0);  // n -> FORKN (monadic)
    end
    do @(negedge clk); while (busy);
    repeat (2) @(negedge clk);

    for (int k = 0; k < NCTX; k++)
      check(got[k], $sformatf("context %0d produced a result", 4*k));

    check(!m_overflow && !d_overflow, "no queue overflow");
    check(n_sna > 0,      $sformatf("sync-non-achieved seen %0d times", n_sna));
    check(n_fill > 0,     $sformatf("IF1 fill-in seen %0d times", n_fill));
    check(n_bubble > 0,   $sformatf("bubble seen %0d times", n_bubble));
    check(n_dprio > 0,    $sformatf("dyadic priority over non-empty monadic queue %0d times", n_dprio));
    check(n_dualpop > 0,  $sformatf("two monadic pops in a cycle %0d times", n_dualpop));
    check(n_dualpush > 0, $sformatf("two pushes into one queue %0d times", n_dualpush));
    check(n_rate_viol == 0, $sformatf("IF idle with tokens queued %0d times", n_rate_viol));
    check(if1_fills == 32'(n_fill), "if1_fills counter");
    check(bubbles == 32'(n_bubble), "bubbles counter");
    check(ops_executed == 32'(n_alu + n_bubble), "ops_executed counter");
    $display("cycles=%0d ops_executed=%0d bubbles=%0d if1_fills=%0d sna=%0d utilisation=%0.1f%%",
             cycles, ops_executed, bubbles, if1_fills, n_sna,
             100.0 * real'(ops_executed - bubbles) / real'(ops_executed));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // result checker
  always @(negedge clk) if (rst_n && out_valid && out_ctx != 8'd200) begin
    int k;
    k = int'(out_ctx) / 4;
    check(int'(out_ctx) % 4 == 0 && k < NCTX && !got[k],
          $sformatf("unexpected result for context %0d", out_ctx));
    if (k < NCTX) begin
      check(out_value == fact(nval[k]),
            $sformatf("context %0d: %0d! = %0d, got %0d", out_ctx, nval[k], fact(nval[k]), out_value));
      got[k] = 1'b1;
    end
  end
endmodule
