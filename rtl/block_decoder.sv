// block_decoder: steers the processor's command stream to the data/logic
// pairs and collects their answers.
//
// The decoder is a binary tree of block_decoder_node junctions, as on the
// H-shaped command bus: the root decodes the top bit of the block index and
// each level below decodes the next bit, so with 8 pairs there are 1 + 2 + 4
// nodes and every pair is a leaf. The block index is Addr2's for SW (both
// forms), Addr's for LW and the Block Idx operand for ST. WT names no block,
// so it is broadcast and accepted only when every pair can take it; each pair
// then holds its own queue until its own logic is idle. NOP instructions, and
// block indices with no pair behind them, are accepted and dropped here.
// Commands pass combinationally (valid/ready). Answers are merged on the way
// up, the lower branch first at every node, which gives fixed priority to the
// lowest pair index; each answer is tagged with its pair's index. The
// processor side always accepts answers.
module block_decoder
  import xima_pkg::*;
#(
  parameter int unsigned NUM_PAIRS = 8
) (
  // processor side
  input  logic                      cmd_valid,
  output logic                      cmd_ready,
  input  instr_t                    cmd,
  output logic                      rsp_valid,
  output rsp_t                      rsp,
  // pair side
  output logic [NUM_PAIRS-1:0]      pr_valid,
  input  logic [NUM_PAIRS-1:0]      pr_ready,
  output instr_t                    pr_instr,
  input  logic [NUM_PAIRS-1:0]      pr_rsp_valid,
  output logic [NUM_PAIRS-1:0]      pr_rsp_ready,
  input  logic [NUM_PAIRS-1:0][DATA_W-1:0] pr_rsp_data
);

  localparam int unsigned L = (NUM_PAIRS > 1) ? $clog2(NUM_PAIRS) : 1;

  logic [BLK_W-1:0] tgt;
  logic             drop;

  always_comb begin
    tgt  = '0;
    drop = 1'b0;
    unique case (cmd.op)
      OP_SW_MOVE, OP_SW_DATA: tgt = cmd.op2.blk;
      OP_LW:                  tgt = op1_as_addr(cmd.op1).blk;
      OP_ST:                  tgt = cmd.op1[BLK_W-1:0];
      OP_WT:                  ;
      default:                drop = 1'b1;
    endcase
    // a block index with no pair behind it is dropped
    if (cmd.op != OP_WT && (32'(tgt) >= NUM_PAIRS)) drop = 1'b1;
  end

  assign pr_instr  = cmd;
  assign cmd_ready = drop || g_lvl[0].ready[0];
  assign rsp_valid = g_lvl[0].lv_rsp_valid[0];
  assign rsp       = g_lvl[0].lv_rsp[0];

  // level l holds 2^l junctions (l < L) or the 2^L leaves (l = L)
  for (genvar l = 0; l <= L; l++) begin : g_lvl
    localparam int unsigned NL = 1 << l;
    logic [NL-1:0]   valid_in, lv_rsp_ready_in; // from the level above
    logic [NL-1:0]   ready, lv_rsp_valid;      // to the level above
    rsp_t [NL-1:0]   lv_rsp;

    if (l == 0) begin : g_root
      assign valid_in        = cmd_valid && !drop;
      assign lv_rsp_ready_in = 1'b1;
    end else begin : g_inner
      assign valid_in        = g_lvl[l-1].g_nodes.valid_dn;
      assign lv_rsp_ready_in = g_lvl[l-1].g_nodes.rsp_ready_dn;
    end

    if (l < L) begin : g_nodes
      logic [2*NL-1:0] valid_dn, rsp_ready_dn;   // to the level below
      for (genvar i = 0; i < NL; i++) begin : g_node
        block_decoder_node #(.BIT(L - 1 - l)) u_node (
          .up_valid    (valid_in[i]),
          .up_ready    (ready[i]),
          .instr       (cmd),
          .up_rsp_valid(lv_rsp_valid[i]),
          .up_rsp_ready(lv_rsp_ready_in[i]),
          .up_rsp      (lv_rsp[i]),
          .dn_valid    (valid_dn[2*i +: 2]),
          .dn_ready    (g_lvl[l+1].ready[2*i +: 2]),
          .dn_rsp_valid(g_lvl[l+1].lv_rsp_valid[2*i +: 2]),
          .dn_rsp_ready(rsp_ready_dn[2*i +: 2]),
          .dn_rsp      (g_lvl[l+1].lv_rsp[2*i +: 2])
        );
      end
    end else begin : g_leaves
      for (genvar j = 0; j < NL; j++) begin : g_leaf
        if (j < NUM_PAIRS) begin : g_pair
          assign pr_valid[j]     = valid_in[j];
          assign ready[j]        = pr_ready[j];
          assign lv_rsp_valid[j] = pr_rsp_valid[j];
          assign pr_rsp_ready[j] = lv_rsp_ready_in[j];
          assign lv_rsp[j].blk   = BLK_W'(j);
          assign lv_rsp[j].data  = pr_rsp_data[j];
        end else begin : g_empty
          // no pair here: only a broadcast WT reaches it, and is taken
          assign ready[j]        = 1'b1;
          assign lv_rsp_valid[j] = 1'b0;
          assign lv_rsp[j]       = '0;
        end
      end
    end
  end

endmodule
