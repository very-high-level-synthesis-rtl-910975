// local_mem: on-chip local memory for array data.
//
// One synchronous write port and one asynchronous (combinational) read port,
// as FPGA distributed RAM provides. A write at edge t is seen by a read of
// the same address from edge t on. Depth 2**AW words of W bits. The source
// only names a local memory that results are stored to; the port set, the
// asynchronous read and the sizes are this design's choices. Contents are not
// reset.
module local_mem #(
  parameter int unsigned W  = 16,
  parameter int unsigned AW = 8
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);

  logic [W-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule
