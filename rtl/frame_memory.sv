// frame_memory: the value half of the token store (activation frames),
// owned by the operand-matching stage.
//
// Holds the value of the first-arriving operand of each dyadic instruction
// at its matching address c+r until the partner arrives.  Asynchronous read,
// synchronous write; not reset, since a slot is always written (presence bit
// set) before it is read.  The split from the presence bits follows the
// document; sizes and port timing are this design's choices.
module frame_memory #(
  parameter int unsigned AW = 8,
  parameter int unsigned DW = 32
) (
  input  logic          clk,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata
);
  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];
endmodule
