// code_memory: the local instruction memory shared by the two
// instruction-fetch stages (IF and IF1).
//
// DEPTH instructions of type instr_t.  Two asynchronous read ports, A for IF
// and B for IF1, so both stages can fetch in the same cycle; one synchronous
// write port through which the host loads the program.  Sharing one memory
// between the two fetch stages follows the original design; the port arrangement
// and the load port are this design's choices.  Contents are not reset.
module code_memory
  import monadic_pkg::*;
#(
  parameter int unsigned DEPTH = 2**IP_W
) (
  input  logic   clk,
  input  logic   we,
  input  ip_t    waddr,
  input  instr_t wdata,
  input  ip_t    raddr_a,
  output instr_t rdata_a,
  input  ip_t    raddr_b,
  output instr_t rdata_b
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  instr_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr[AW-1:0]] <= wdata;
  end

  assign rdata_a = mem[raddr_a[AW-1:0]];
  assign rdata_b = mem[raddr_b[AW-1:0]];
endmodule
