// tb_alu: random operands for every opcode, with edge values mixed in,
// compared one cycle later with results computed in the testbench.
module tb_alu;
  import monadic_pkg::*;

  logic  clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  op_t   op = OP_ID;
  data_t vl = '0, vr = '0;
  logic  out_valid;
  data_t result;

  alu dut (.*);

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

  function automatic data_t pick();
    case ($urandom_range(0, 5))
      0: return 32'h0;
      1: return 32'hFFFF_FFFF;
      2: return 32'h8000_0000;
      3: return 32'(($urandom_range(0, 20)));
      default: return $urandom;
    endcase
  endfunction

  function automatic data_t ref_alu(op_t o, data_t a, data_t b);
    longint sa, sb;
    sa = longint'($signed(a)); sb = longint'($signed(b));
    case (o)
      OP_ADD: return data_t'(longint'(a) + longint'(b));
      OP_SUB: return data_t'(longint'(a) - longint'(b));
      OP_MUL: return data_t'(longint'(a) * longint'(b));
      OP_AND: return a & b;
      OP_OR:  return a | b;
      OP_XOR: return a ^ b;
      OP_LT:  return (sa < sb) ? 1 : 0;
      OP_GT:  return (sa > sb) ? 1 : 0;
      OP_EQ:  return (a == b) ? 1 : 0;
      default: return a;
    endcase
  endfunction

  initial begin
    bit    pv;
    data_t pr;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    pv = 0; pr = '0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      if (i > 0) begin
        check(out_valid == pv, "valid delayed one cycle");
        check(result == pr, $sformatf("result %h expected %h", result, pr));
      end
      in_valid = ($urandom_range(0, 7) != 0);
      op = op_t'($urandom_range(0, 11));
      vl = pick(); vr = pick();
      pv = in_valid; pr = ref_alu(op, vl, vr);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
