// xima_top: distributed in-memory matrix-multiplication accelerator on binary
// RRAM crossbars.
//
// NUM_PAIRS local data/logic pairs hang off one command port. The external
// processor sends SW/LW/ST/WT instructions; the block decoder hands each to
// the pair named by its block index (WT goes to all), and each pair's control
// bus executes them in order. A pair's logic block multiplies a ROWS x N
// binary matrix (its input-data layer) by an N-bit binary vector (stored in
// its digitizing crossbar) in 3 clocks per row, leaving ROWS results of
// log2(N) bits in the pair's SRAM array. The adder-merger reads row
// merge_row from every pair's SRAM at once and merges the results, either
// weighting pair p by 2^p (pairs hold bit-planes of multi-bit data) or
// summing them (pairs hold sub-vectors of a longer vector).
//
// Defaults: 8 pairs, 16x16 crossbars, 4-bit row results, 12-bit merged
// result. The crossbar size and the adder widths follow the source's 16x16
// example and its 12-bit adders, and the eight pairs its architecture
// drawing; the memory sizes are this design's. The block decoder is a tree
// of junctions, one per branch point of the command bus. All ports are synchronous to clk; rst_n is an active-low
// asynchronous reset.
module xima_top
  import xima_pkg::*;
#(
  parameter int unsigned NUM_PAIRS = 8,
  parameter int unsigned N         = XB_N,
  parameter int unsigned ROWS      = XB_ROWS,
  parameter int unsigned W         = $clog2(N),
  parameter int unsigned MW        = W + NUM_PAIRS
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // command IO to the processor
  input  logic                    cmd_valid,
  output logic                    cmd_ready,
  input  instr_t                  cmd,
  output logic                    rsp_valid,
  output rsp_t                    rsp,
  // adder-merger
  input  logic [$clog2(ROWS)-1:0] merge_row,
  input  logic                    merge_bitplane,
  output logic [MW-1:0]           merge_result,
  // status
  output logic [NUM_PAIRS-1:0]    busy
);

  logic [NUM_PAIRS-1:0]             pr_valid, pr_ready, pr_rsp_valid, pr_rsp_ready;
  logic [NUM_PAIRS-1:0]             pr_done, pr_wt_stall;
  instr_t                           pr_instr;
  logic [NUM_PAIRS-1:0][DATA_W-1:0] pr_rsp_data, pr_merge_data;
  logic [NUM_PAIRS-1:0][W-1:0]      merge_in;

  block_decoder #(.NUM_PAIRS(NUM_PAIRS)) u_bdec (
    .cmd_valid   (cmd_valid),
    .cmd_ready   (cmd_ready),
    .cmd         (cmd),
    .rsp_valid   (rsp_valid),
    .rsp         (rsp),
    .pr_valid    (pr_valid),
    .pr_ready    (pr_ready),
    .pr_instr    (pr_instr),
    .pr_rsp_valid(pr_rsp_valid),
    .pr_rsp_ready(pr_rsp_ready),
    .pr_rsp_data (pr_rsp_data)
  );

  for (genvar p = 0; p < NUM_PAIRS; p++) begin : g_pair
    xima_pair #(.N(N), .ROWS(ROWS)) u_pair (
      .clk       (clk),
      .rst_n     (rst_n),
      .in_valid  (pr_valid[p]),
      .in_ready  (pr_ready[p]),
      .in_instr  (pr_instr),
      .rsp_valid (pr_rsp_valid[p]),
      .rsp_ready (pr_rsp_ready[p]),
      .rsp_data  (pr_rsp_data[p]),
      .merge_addr(merge_row),
      .merge_data(pr_merge_data[p]),
      .busy      (busy[p]),
      .done      (pr_done[p]),
      .wt_stall  (pr_wt_stall[p])
    );
    assign merge_in[p] = pr_merge_data[p][W-1:0];
  end

  adder_merger #(.B(NUM_PAIRS), .IW(W), .OW(MW)) u_merge (
    .in      (merge_in),
    .bitplane(merge_bitplane),
    .out     (merge_result)
  );

endmodule
