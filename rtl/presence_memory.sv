// presence_memory: the presence-bit half of the token store, one bit per
// frame slot, owned by the sync-check stage.
//
// A set bit means the slot already holds the first-arriving operand of a
// dyadic instruction.  Asynchronous read and synchronous write let the
// sync-check stage read, transform and write back a bit within one cycle;
// reset clears every bit (all slots empty).  Splitting presence bits from
// the frame values follows the original design; one bit per slot, the reset and the
// port timing are this design's choices.
module presence_memory #(
  parameter int unsigned AW = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [AW-1:0] raddr,
  output logic          rdata,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic          wdata
);
  logic [2**AW-1:0] bits;

  always_ff @(posedge clk) begin
    if (!rst_n)  bits        <= '0;
    else if (we) bits[waddr] <= wdata;
  end

  assign rdata = bits[raddr];
endmodule
