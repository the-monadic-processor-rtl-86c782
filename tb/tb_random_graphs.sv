// tb_random_graphs: randomised test of the whole processor element.
//
// Each trial builds a random acyclic dataflow graph: leaves are tokens
// injected by the host; inner nodes are monadic instructions with an
// immediate operand, dyadic instructions (each with its own rendezvous
// slot) and identity forks with two destinations; the last value goes to an
// OUT instruction.  The graph is loaded and run in NCTX contexts at once,
// each with its own leaf values, so their tokens interleave in the queues.
// Every context must deliver exactly one result, equal to the graph
// evaluated in the testbench; afterwards the queues must be empty, no
// overflow may have happened and every presence bit must be clear again
// (each rendezvous slot was used by exactly one pair).
module tb_random_graphs;
  import monadic_pkg::*;

  localparam int NTRIALS  = 12;
  localparam int NCTX     = 6;
  localparam int MAXNODES = 60;
  localparam int NLEAF    = 10;

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
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // graph: nodes 0..nn-1 are instructions at the same addresses
  typedef enum {K_MON, K_DY, K_FORK, K_OUT} kind_t;
  kind_t  kind [MAXNODES+2];
  op_t    nop  [MAXNODES+2];
  int     nimm [MAXNODES+2];
  int     nr   [MAXNODES+2];
  int     src  [MAXNODES+2][2];   // producers: >= 0 node, < 0 leaf -(i+1)
  dest_t  dst  [MAXNODES+2][2];
  bit     dsts [MAXNODES+2][2];
  bit     dstv [MAXNODES+2][2];
  dest_t  leaf_dst [NLEAF];
  bit     leaf_s   [NLEAF];
  int     nn, ndy;

  // pool of unconsumed values: producer id (node >= 0, leaf < 0) and output
  int pool_p [$];
  int pool_o [$];

  // connect pool entry k to input port 'port' of node 'n'
  function automatic void consume(int k, int n, int port, bit dyadic_consumer);
    int p, o;
    p = pool_p[k]; o = pool_o[k];
    pool_p.delete(k); pool_o.delete(k);
    src[n][port] = p;
    if (p >= 0) begin
      dst[p][o]  = '{ip: ip_t'(n), port: 1'(port)};
      dsts[p][o] = dyadic_consumer;
      dstv[p][o] = 1'b1;
    end else begin
      leaf_dst[-p-1] = '{ip: ip_t'(n), port: 1'(port)};
      leaf_s[-p-1]   = dyadic_consumer;
    end
  endfunction

  function automatic void build();
    op_t dy_ops [6] = '{OP_ADD, OP_SUB, OP_MUL, OP_XOR, OP_AND, OP_OR};
    op_t mo_ops [5] = '{OP_ADD, OP_SUB, OP_MUL, OP_XOR, OP_ID};
    pool_p.delete(); pool_o.delete();
    for (int i = 0; i < NLEAF; i++) begin pool_p.push_back(-(i+1)); pool_o.push_back(0); end
    nn = 0; ndy = 0;
    while (pool_p.size() > 1 || nn == 0) begin
      int a, n;
      n = nn++;
      dstv[n] = '{0, 0}; dsts[n] = '{0, 0}; dst[n] = '{default: '0}; src[n] = '{-100, -100};
      nimm[n] = 0; nr[n] = 0;
      a = $urandom_range(0, 99);
      if (pool_p.size() >= 2 && (a < 50 || nn > MAXNODES - 5)) begin
        kind[n] = K_DY; nop[n] = dy_ops[$urandom_range(0, 5)]; nr[n] = ndy++;
        consume($urandom_range(0, pool_p.size()-1), n, 0, 1'b1);
        consume($urandom_range(0, pool_p.size()-1), n, 1, 1'b1);
        pool_p.push_back(n); pool_o.push_back(0);
      end else if (a < 65 && nn < MAXNODES - 10) begin
        kind[n] = K_FORK; nop[n] = OP_ID;
        consume($urandom_range(0, pool_p.size()-1), n, 0, 1'b0);
        pool_p.push_back(n); pool_o.push_back(0);
        pool_p.push_back(n); pool_o.push_back(1);
      end else begin
        kind[n] = K_MON; nop[n] = mo_ops[$urandom_range(0, 4)];
        nimm[n] = $urandom_range(0, 65535);
        consume($urandom_range(0, pool_p.size()-1), n, 0, 1'b0);
        pool_p.push_back(n); pool_o.push_back(0);
      end
    end
    // final value to OUT
    kind[nn] = K_OUT; nop[nn] = OP_OUT; dstv[nn] = '{0, 0}; dsts[nn] = '{0, 0};
    dst[nn] = '{default: '0}; nimm[nn] = 0; nr[nn] = 0;
    consume(0, nn, 0, 1'b0);
    nn++;
  endfunction

  function automatic data_t apply(op_t op, data_t a, data_t b);
    case (op)
      OP_ADD: return a + b;
      OP_SUB: return a - b;
      OP_MUL: return a * b;
      OP_XOR: return a ^ b;
      OP_AND: return a & b;
      OP_OR:  return a | b;
      default: return a;
    endcase
  endfunction

  data_t leafv [NCTX][NLEAF];
  data_t nodev [MAXNODES+2];

  function automatic data_t value_of(int ctxi, int p);
    return (p >= 0) ? nodev[p] : leafv[ctxi][-p-1];
  endfunction

  function automatic data_t evaluate(int ctxi);
    for (int n = 0; n < nn; n++) begin
      data_t a, b;
      a = value_of(ctxi, src[n][0]);
      case (kind[n])
        K_DY:    begin b = value_of(ctxi, src[n][1]); nodev[n] = apply(nop[n], a, b); end
        K_MON:   nodev[n] = apply(nop[n], a, {{16{nimm[n][15]}}, nimm[n][15:0]});
        default: nodev[n] = a;
      endcase
    end
    return nodev[nn-1];
  endfunction

  task automatic load(input int a, input instr_t i);
    @(negedge clk);
    cm_we = 1'b1; cm_waddr = ip_t'(a); cm_wdata = i;
    @(negedge clk);
    cm_we = 1'b0;
  endtask

  task automatic inject(input token_t t, input bit s);
    @(negedge clk);
    in_valid = 1'b1; in_tok = t; in_s = s;
    #1;
    while (!in_ready) begin
      @(negedge clk);
      #1;
    end
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  int    got   [NCTX];
  data_t gotv  [NCTX];
  int    stride;
  always @(negedge clk) if (rst_n && out_valid) begin
    int k;
    k = int'(out_ctx) / stride;
    if (int'(out_ctx) % stride == 0 && k < NCTX) begin
      got[k]++;
      gotv[k] = out_value;
    end else begin
      check(0, $sformatf("result from unexpected context %0d", out_ctx));
    end
  end

  int tot_fill = 0, tot_bub = 0, tot_ops = 0;

  initial begin
    for (int trial = 0; trial < NTRIALS; trial++) begin
      build();
      stride = (ndy > 0) ? ndy : 1;
      // program
      for (int n = 0; n < nn; n++) begin
        instr_t i;
        i = '0;
        i.op  = nop[n];
        i.mf  = (kind[n] == K_DY) ? MF_DYADIC : MF_MONADIC;
        i.r   = ctx_t'(nr[n]);
        i.imm = IMM_W'(nimm[n]);
        i.d1  = dst[n][0]; i.d2 = dst[n][1];
        i.d1v = dstv[n][0]; i.d2v = dstv[n][1];
        i.s1  = dsts[n][0]; i.s2 = dsts[n][1];
        load(n, i);
      end
      @(negedge clk);
      rst_n = 1'b0;
      repeat (2) @(negedge clk);
      rst_n = 1'b1;
      for (int k = 0; k < NCTX; k++) begin
        got[k] = 0;
        for (int l = 0; l < NLEAF; l++) leafv[k][l] = $urandom;
      end
      // inject the leaves of all contexts, interleaved
      for (int l = 0; l < NLEAF; l++)
        for (int k = 0; k < NCTX; k++)
          inject('{ctx: ctx_t'(k * stride), ip: leaf_dst[l].ip, port: leaf_dst[l].port,
                   value: leafv[k][l]}, leaf_s[l]);
      do @(negedge clk); while (busy);
      @(negedge clk);
      for (int k = 0; k < NCTX; k++) begin
        data_t e;
        e = evaluate(k);
        check(got[k] == 1, $sformatf("trial %0d ctx %0d: %0d results", trial, k, got[k]));
        check(gotv[k] == e, $sformatf("trial %0d ctx %0d: got %h expected %h", trial, k, gotv[k], e));
      end
      check(!m_overflow && !d_overflow, $sformatf("trial %0d: no overflow", trial));
      check(dut.u_pb.bits == '0, $sformatf("trial %0d: all presence bits clear", trial));
      tot_fill += int'(if1_fills); tot_bub += int'(bubbles); tot_ops += int'(ops_executed);
      $display("trial %0d: %0d nodes (%0d dyadic), ops=%0d bubbles=%0d if1_fills=%0d",
               trial, nn, ndy, ops_executed, bubbles, if1_fills);
    end
    check(tot_fill > 0 && tot_bub > 0, "fill-ins and bubbles both occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
