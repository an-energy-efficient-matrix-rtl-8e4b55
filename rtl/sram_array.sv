// sram_array: the CMOS SRAM of a pair's control bus, holding temporary data
// such as the row results of the in-memory logic until they are read or
// written back to the data array.
//
// One synchronous write port (fed by the logic block) and two combinational
// read ports: one for the control bus's instructions and one for the
// adder-merger. Size and port arrangement are this design's choices; the
// array is cleared by reset so that a row never computed reads as 0.
module sram_array #(
  parameter int unsigned W     = xima_pkg::DATA_W,
  parameter int unsigned DEPTH = xima_pkg::XB_ROWS
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [W-1:0]             wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr_a,
  output logic [W-1:0]             rdata_a,
  input  logic [$clog2(DEPTH)-1:0] raddr_b,
  output logic [W-1:0]             rdata_b
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else if (we) begin
      mem[waddr] <= wdata;
    end
  end

  assign rdata_a = mem[raddr_a];
  assign rdata_b = mem[raddr_b];

endmodule
