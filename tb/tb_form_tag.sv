// tb_form_tag: random operand packets into the form-tag unit; one cycle
// later the tags must carry the packet's context, destinations and S bits,
// with tag-valid bits following the destination-valid bits (ordinary
// instructions), the condition v_r (STEER), or none with the output flag
// set (OUT).  An empty slot must give no tags.
module tb_form_tag;
  import monadic_pkg::*;

  logic  clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  exec_t in = '0;
  tags_t out;

  form_tag dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    tags_t e;
    int n_steer_t = 0, n_steer_f = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    e = '0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      if (i > 0) check(out == e, $sformatf("tags (cycle %0d)", i));
      in_valid = ($urandom_range(0, 5) != 0);
      in.op  = op_t'($urandom_range(0, 11));
      in.vl  = $urandom;
      in.vr  = ($urandom_range(0, 1) == 0) ? '0 : data_t'($urandom);
      in.ctx = ctx_t'($urandom);
      in.d1  = '{ip: ip_t'($urandom), port: 1'($urandom)};
      in.d2  = '{ip: ip_t'($urandom), port: 1'($urandom)};
      {in.d1v, in.d2v, in.s1, in.s2} = 4'($urandom);
      e.ctx = in.ctx; e.d1 = in.d1; e.d2 = in.d2; e.s1 = in.s1; e.s2 = in.s2;
      e.t1v = 0; e.t2v = 0; e.out = 0;
      if (in_valid) begin
        if (in.op == OP_STEER) begin
          e.t1v = in.d1v && (in.vr != 0);
          e.t2v = in.d2v && (in.vr == 0);
          if (in.vr != 0) n_steer_t++; else n_steer_f++;
        end else if (in.op == OP_OUT) e.out = 1;
        else begin e.t1v = in.d1v; e.t2v = in.d2v; end
      end
    end
    check(n_steer_t > 0 && n_steer_f > 0, "both steering directions exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
