// merge_node: one node of the adder-merger tree, adding the partial results
// of two halves of the design.
//
// out = a + (b << shift). With shift = 0 it sums the partial inner products
// of two sub-vectors (the "distributed intermediate results merge" of the
// source); with shift set to the number of bit-planes below b it weights the
// results of higher bit-planes (the real-value extension). The operand width
// and the shift input are this design's. Purely combinational.
module merge_node #(
  parameter int unsigned W  = 12,
  parameter int unsigned SW = 3
) (
  input  logic [W-1:0]  a,
  input  logic [W-1:0]  b,
  input  logic [SW-1:0] shift,
  output logic [W-1:0]  out
);

  assign out = a + (b << shift);

endmodule
