// tb_token_lifo: random test of the LIFO token queue against a queue model
// kept in the testbench.  Small depth (8) so that full and overflow occur.
// Each cycle 0..2 pushes and 0..min(2,count) pops are applied; top, next,
// count and the sticky overflow flag are compared every cycle.
module tb_token_lifo;
  import monadic_pkg::*;

  localparam int DEPTH = 8;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic [1:0] push_n = '0, pop_n = '0;
  token_t     push_tok [2];
  token_t     top, next;
  logic [$clog2(DEPTH+1)-1:0] count;
  logic       overflow;

  token_lifo #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

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

  token_t model [$];
  bit     ovf = 0;
  int     n_full = 0, n_ovf_events = 0, n_dual = 0;

  function automatic token_t rnd_tok();
    token_t t;
    t.ctx = ctx_t'($urandom); t.ip = ip_t'($urandom); t.port = 1'($urandom);
    t.value = data_t'($urandom);
    return t;
  endfunction

  initial begin
    push_tok[0] = '0; push_tok[1] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      int np, npush;
      @(negedge clk);
      // compare outputs against the model
      check(int'(count) == model.size(), $sformatf("count %0d, model %0d", count, model.size()));
      if (model.size() >= 1) check(top == model[$], "top");
      if (model.size() >= 2) check(next == model[$-1], "next");
      check(overflow == ovf, "overflow flag");
      // choose this cycle's operation; bias towards filling in phases
      np    = $urandom_range(0, (model.size() < 2) ? model.size() : 2);
      npush = $urandom_range(0, 2);
      if ((cyc / 200) % 2 == 0 && np > 0 && $urandom_range(0, 3) != 0) np = np - 1;
      pop_n = 2'(np); push_n = 2'(npush);
      push_tok[0] = rnd_tok(); push_tok[1] = rnd_tok();
      if (np == 2 || npush == 2) n_dual++;
      // model update
      for (int i = 0; i < np; i++) void'(model.pop_back());
      for (int i = 0; i < npush; i++) begin
        if (model.size() < DEPTH) model.push_back(push_tok[i]);
        else begin ovf = 1; n_ovf_events++; end
      end
      if (model.size() == DEPTH) n_full++;
    end
    @(negedge clk);
    pop_n = '0; push_n = '0;
    check(n_full > 0 && n_ovf_events > 0 && n_dual > 0, "full, overflow and dual ports exercised");
    // reset empties the queue and clears the flag
    rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(count == '0 && !overflow, "reset empties the queue");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
