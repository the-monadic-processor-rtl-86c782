// tb_code_memory: writes random instructions to random addresses and reads
// them back through both read ports at independent addresses, comparing
// with a model array.  Reads are asynchronous, writes take effect at the
// clock edge.
module tb_code_memory;
  import monadic_pkg::*;

  logic   clk = 1'b0, we = 1'b0;
  ip_t    waddr = '0, raddr_a = '0, raddr_b = '0;
  instr_t wdata = '0, rdata_a, rdata_b;

  code_memory dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  instr_t model [256];
  bit     written [256];

  function automatic instr_t rnd();
    logic [63:0] b;
    b = {$urandom, $urandom};
    return instr_t'(b[$bits(instr_t)-1:0]);
  endfunction

  initial begin
    // fill the whole memory first
    for (int a = 0; a < 256; a++) begin
      @(negedge clk);
      we = 1'b1; waddr = ip_t'(a); wdata = rnd();
      model[a] = wdata; written[a] = 1;
    end
    @(negedge clk);
    we = 1'b0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      raddr_a = ip_t'($urandom); raddr_b = ip_t'($urandom);
      #1;
      check(rdata_a == model[raddr_a], $sformatf("port A addr %0d", raddr_a));
      check(rdata_b == model[raddr_b], $sformatf("port B addr %0d", raddr_b));
      if ($urandom_range(0, 3) == 0) begin
        we = 1'b1; waddr = ip_t'($urandom); wdata = rnd();
        #1;
        check(rdata_a == model[raddr_a], "write not visible before the edge");
        model[waddr] = wdata;
        @(posedge clk); #1;
        we = 1'b0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
