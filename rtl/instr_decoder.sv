// instr_decoder: turns the instruction at the head of a pair's queue into
// the actions of the control bus.
//
//   SW Addr1 Addr2 : read Addr1, write that word to Addr2   (src_rd, dst_wr)
//   SW Data  Addr  : write the immediate word to Addr        (dst_wr, imm)
//   LW Addr        : read Addr and answer the processor      (src_rd, respond)
//   ST Block Idx   : start the logic block                   (start)
//   WT             : hold the queue while the logic computes (wait)
//
// The actions follow the source's instruction table; the encoding of the two
// SW forms as separate opcodes is this design's. Purely combinational.
module instr_decoder
  import xima_pkg::*;
(
  input  instr_t            instr,
  output addr_t             src,
  output addr_t             dst,
  output logic [DATA_W-1:0] wdata_imm,
  output logic              src_rd,
  output logic              dst_wr,
  output logic              use_imm,
  output logic              respond,
  output logic              start,
  output logic              wait_done,
  output logic [BLK_W-1:0]  start_blk
);

  always_comb begin
    src       = op1_as_addr(instr.op1);
    dst       = instr.op2;
    wdata_imm = instr.op1;
    start_blk = instr.op1[BLK_W-1:0];
    src_rd    = 1'b0;
    dst_wr    = 1'b0;
    use_imm   = 1'b0;
    respond   = 1'b0;
    start     = 1'b0;
    wait_done = 1'b0;
    unique case (instr.op)
      OP_SW_MOVE: begin src_rd = 1'b1; dst_wr = 1'b1; end
      OP_SW_DATA: begin dst_wr = 1'b1; use_imm = 1'b1; end
      OP_LW:      begin src_rd = 1'b1; respond = 1'b1; end
      OP_ST:      start = 1'b1;
      OP_WT:      wait_done = 1'b1;
      default:    ;
    endcase
  end

endmodule
