// encoder_layer: step 3 of the in-memory inner product, one-hot to binary.
//
// The encoder is a crossbar with one pre-configured binary word per row. The
// one-hot transition vector o2 from the XOR layer activates exactly one row,
// and the columns read out that row's word. Row k (o2[k], counted from 0)
// holds k+1 truncated to W bits, so for N = 8 the rows read 001, 010, ...,
// 111, 000, as in the source's 8-to-3 look-up table: an inner product equal
// to N therefore reads as 0, the same as an all-zero o2 (s = 0). That
// aliasing is the source's; W = log2(N) is its encoder width.
//
// Row words are writable (configuring the logic), with a synchronous write
// port; reset loads the default k+1 codes. The read is combinational: code is
// the OR of all rows whose o2 bit is set.
module encoder_layer #(
  parameter int unsigned N = 16,
  parameter int unsigned W = (N > 1) ? $clog2(N) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 cfg_we,
  input  logic [$clog2(N)-1:0] cfg_row,
  input  logic [W-1:0]         cfg_code,
  input  logic [N-1:0]         o2,
  output logic [W-1:0]         code
);

  logic [W-1:0] rows [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < N; k++) rows[k] <= W'(k + 1);
    end else if (cfg_we) begin
      rows[cfg_row] <= cfg_code;
    end
  end

  always_comb begin
    code = '0;
    for (int k = 0; k < N; k++) begin
      if (o2[k]) code = code | rows[k];
    end
  end

endmodule
