// data_array: the data half of a data/logic pair, a single-layer binary RRAM
// crossbar used as plain non-volatile memory.
//
// Each word is one crossbar row of W bits; there are DEPTH rows. The source
// gives the data array's role (holding original data and written-back
// results) but not its size or port timing: here a write takes effect on the
// rising clock edge and the read port is combinational. Being non-volatile,
// the array has no reset.
module data_array #(
  parameter int unsigned W     = xima_pkg::DATA_W,
  parameter int unsigned DEPTH = 2 ** xima_pkg::INADDR_W
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [W-1:0]             wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [W-1:0]             rdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule
