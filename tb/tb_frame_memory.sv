// tb_frame_memory: random writes and reads of operand values against a
// model array; a write is visible after its clock edge.
module tb_frame_memory;
  localparam int AW = 8, DW = 32;

  logic          clk = 1'b0, we = 1'b0;
  logic [AW-1:0] raddr = '0, waddr = '0;
  logic [DW-1:0] wdata = '0, rdata;

  frame_memory #(.AW(AW), .DW(DW)) dut (.*);

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

  logic [DW-1:0] model [2**AW];

  initial begin
    for (int a = 0; a < 2**AW; a++) begin
      @(negedge clk);
      we = 1'b1; waddr = AW'(a); wdata = $urandom; model[a] = wdata;
    end
    @(negedge clk);
    we = 1'b0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      raddr = AW'($urandom); #1;
      check(rdata == model[raddr], $sformatf("read %0d", raddr));
      we = 1'($urandom); waddr = AW'($urandom); wdata = $urandom;
      if (we) model[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
