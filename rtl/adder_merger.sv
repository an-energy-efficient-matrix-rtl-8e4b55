// adder_merger: CMOS tree that merges the row results of B pairs into one
// multi-bit result.
//
// Two modes:
//   bitplane = 1 : input b is the binary inner product of bit-plane b of
//                  multi-bit data with a binary vector; the output is
//                  sum_b in[b] * 2^b, the real-valued inner product (source:
//                  "extension for real-value multiplication").
//   bitplane = 0 : the inputs are partial inner products of sub-vectors and
//                  the output is their plain sum (source: distributed
//                  merging of intermediate results).
// The tree has log2(B) levels of merge_node adders; level l shifts its right
// operand by 2^l in bit-plane mode. With B = 8 bit-planes of 4-bit results
// the adders are 12 bits wide and the tree is 3 levels deep, which is how
// this design reads the source's "3x12-bit adders". B must be a power of 2.
// Purely combinational.
module adder_merger #(
  parameter int unsigned B  = 8,
  parameter int unsigned IW = 4,
  parameter int unsigned OW = IW + B
) (
  input  logic [B-1:0][IW-1:0] in,
  input  logic                 bitplane,
  output logic [OW-1:0]        out
);

  localparam int unsigned L  = $clog2(B);
  localparam int unsigned SW = (L > 0) ? $clog2(B) : 1;

  // g_lvl[l].sum holds the B >> (l+1) partial results after level l.
  for (genvar l = 0; l < L; l++) begin : g_lvl
    localparam int unsigned NN = B >> (l + 1);
    logic [OW-1:0] sum [NN];
    for (genvar i = 0; i < NN; i++) begin : g_node
      logic [OW-1:0] a, b;
      if (l == 0) begin : g_leaf
        assign a = OW'(in[2*i]);
        assign b = OW'(in[2*i+1]);
      end else begin : g_inner
        assign a = g_lvl[l-1].sum[2*i];
        assign b = g_lvl[l-1].sum[2*i+1];
      end
      merge_node #(.W(OW), .SW(SW)) u_node (
        .a    (a),
        .b    (b),
        .shift(bitplane ? SW'(1 << l) : '0),
        .out  (sum[i])
      );
    end
  end

  if (L == 0) begin : g_single
    assign out = OW'(in[0]);
  end else begin : g_root
    assign out = g_lvl[L-1].sum[0];
  end

endmodule
