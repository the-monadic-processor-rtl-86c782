// tb_presence_memory: checks that reset clears every bit, then applies
// random reads and writes against a model bit array.
module tb_presence_memory;
  localparam int AW = 8;

  logic          clk = 1'b0, rst_n = 1'b0, we = 1'b0, wdata = 1'b0;
  logic [AW-1:0] raddr = '0, waddr = '0;
  logic          rdata;

  presence_memory #(.AW(AW)) dut (.*);

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

  bit model [2**AW];

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int a = 0; a < 2**AW; a++) begin
      raddr = AW'(a); #1;
      check(rdata == 1'b0, $sformatf("bit %0d clear after reset", a));
      model[a] = 0;
    end
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      raddr = AW'($urandom); #1;
      check(rdata == model[raddr], $sformatf("read %0d", raddr));
      we = 1'($urandom); waddr = ($urandom_range(0, 1) == 0) ? raddr : AW'($urandom); wdata = 1'($urandom);
      #1;
      check(rdata == model[raddr], "write not visible before the edge");
      if (we) model[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
