// xor_layer: step 2 of the in-memory inner product, transition detection.
//
// The digitizing step delivers a thermometer code o1 whose first s bits are 1.
// Bit k of the output is 1 only where o1 steps from 1 to 0, i.e.
//     o2[k] = o1[k] & ~o1[k+1],  and  o2[N-1] = o1[N-1]
// (the last column is compared with a constant, as the source's gate list
// shows). On a valid thermometer code this equals the XOR of adjacent bits,
// and the result is one-hot at position s-1, or all zero for s = 0.
// Purely combinational.
module xor_layer #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0] o1,
  output logic [N-1:0] o2
);

  always_comb begin
    for (int k = 0; k < N - 1; k++) o2[k] = o1[k] & ~o1[k+1];
    o2[N-1] = o1[N-1];
  end

endmodule
