// block_decoder_node: one junction of the block-decoder tree.
//
// A node has one side towards the processor (up) and two branches (down).
// It decodes bit BIT of the instruction's block index: 0 selects branch 0,
// 1 selects branch 1. WT names no block and goes down both branches, in the
// same cycle, once both can take it. NOPs are accepted and dropped. The
// instruction word itself is not touched: every pair sees the same bus and
// only its valid is steered. Commands pass combinationally (valid/ready).
//
// Answers coming up from the two branches are merged with fixed priority,
// branch 0 first; the answer keeps the block index its pair gave it.
//
// The source places block decoders at the junctions of the command bus and
// says no more about them; decoding one index bit per junction, the WT
// broadcast and the answer priority are this design's choices.
module block_decoder_node
  import xima_pkg::*;
#(
  parameter int unsigned BIT = 0
) (
  // towards the processor
  input  logic       up_valid,
  output logic       up_ready,
  input  instr_t     instr,
  output logic       up_rsp_valid,
  input  logic       up_rsp_ready,
  output rsp_t       up_rsp,
  // towards the pairs
  output logic [1:0] dn_valid,
  input  logic [1:0] dn_ready,
  input  logic [1:0] dn_rsp_valid,
  output logic [1:0] dn_rsp_ready,
  input  rsp_t [1:0] dn_rsp
);

  logic [BLK_W-1:0] tgt;
  logic             bcast, drop, side;

  always_comb begin
    tgt   = '0;
    bcast = 1'b0;
    drop  = 1'b0;
    unique case (instr.op)
      OP_SW_MOVE, OP_SW_DATA: tgt = instr.op2.blk;
      OP_LW:                  tgt = op1_as_addr(instr.op1).blk;
      OP_ST:                  tgt = instr.op1[BLK_W-1:0];
      OP_WT:                  bcast = 1'b1;
      default:                drop = 1'b1;
    endcase
    side = tgt[BIT];
  end

  always_comb begin
    if (drop) begin
      up_ready = 1'b1;
      dn_valid = '0;
    end else if (bcast) begin
      up_ready = &dn_ready;
      dn_valid = {2{up_valid && (&dn_ready)}};
    end else begin
      up_ready = dn_ready[side];
      dn_valid = '0;
      dn_valid[side] = up_valid;
    end
  end

  // answers: branch 0 first
  always_comb begin
    dn_rsp_ready = '0;
    if (dn_rsp_valid[0]) begin
      up_rsp_valid    = 1'b1;
      up_rsp          = dn_rsp[0];
      dn_rsp_ready[0] = up_rsp_ready;
    end else begin
      up_rsp_valid    = dn_rsp_valid[1];
      up_rsp          = dn_rsp[1];
      dn_rsp_ready[1] = up_rsp_ready && dn_rsp_valid[1];
    end
  end

endmodule
