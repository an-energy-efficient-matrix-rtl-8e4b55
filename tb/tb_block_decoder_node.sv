// tb_block_decoder_node: one junction of the block-decoder tree, decoding
// bit 1 of the block index. Checks the steering of SW (both forms), LW and
// ST by that bit for every block index, the WT broadcast (only when both
// branches are ready), dropped NOPs, ready passing back up, and the answer
// merge with branch 0 first.
module tb_block_decoder_node;
  import xima_pkg::*;
  localparam int BIT = 1;
  int checks = 0, failures = 0;

  logic       up_valid = 0, up_ready, up_rsp_valid, up_rsp_ready = 1;
  instr_t     instr = '0;
  rsp_t       up_rsp;
  logic [1:0] dn_valid, dn_ready = '1, dn_rsp_valid = '0, dn_rsp_ready;
  rsp_t [1:0] dn_rsp = '0;

  block_decoder_node #(.BIT(BIT)) dut (.*);

  task automatic chk(input int g, input int e, input string what);
    checks++;
    if (g !== e) begin failures++; $display("FAIL %s: got %0d exp %0d", what, g, e); end
  endtask

  initial begin
    #100000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    addr_t a;
    int side;
    for (int b = 0; b < (1 << BLK_W); b++) begin
      side = (b >> BIT) & 1;
      a = '0; a.blk = BLK_W'(b); a.mod = MOD_LOGIC;
      for (int op = 0; op < 4; op++) begin
        instr = '0;
        case (op)
          0: begin instr.op = OP_SW_DATA; instr.op2 = a; end
          1: begin instr.op = OP_SW_MOVE; instr.op1 = 16'h0fff; instr.op2 = a; end
          2: begin instr.op = OP_LW; instr.op1 = DATA_W'(a); end
          default: begin instr.op = OP_ST; instr.op1 = DATA_W'(b); end
        endcase
        up_valid = 1; dn_ready = 2'b11; #1;
        chk(dn_valid, 1 << side, $sformatf("op %0d block %0d steered", op, b));
        chk(up_ready, 1, "ready with both branches ready");
        dn_ready = 2'(1 << (1 - side)); #1;
        chk(up_ready, 0, "ready follows the selected branch");
        up_valid = 0; #1;
        chk(dn_valid, 0, "nothing offered, nothing steered");
      end
    end
    // WT goes to both branches, only when both are ready
    instr = '0; instr.op = OP_WT; up_valid = 1;
    for (int r = 0; r < 4; r++) begin
      dn_ready = 2'(r); #1;
      chk(dn_valid, (r == 3) ? 3 : 0, $sformatf("WT with ready %0d", r));
      chk(up_ready, r == 3, $sformatf("WT ready with ready %0d", r));
    end
    // NOP is taken and dropped
    instr.op = OP_NOP; dn_ready = '0; #1;
    chk(dn_valid, 0, "NOP not steered");
    chk(up_ready, 1, "NOP taken");
    up_valid = 0;
    // answers: branch 0 first
    dn_rsp[0] = '{blk: 3'd2, data: 16'h1111};
    dn_rsp[1] = '{blk: 3'd6, data: 16'h2222};
    for (int v = 0; v < 4; v++) begin
      dn_rsp_valid = 2'(v); up_rsp_ready = 1; #1;
      chk(up_rsp_valid, v != 0, $sformatf("answer valid for %0d", v));
      if (v != 0) begin
        chk(up_rsp.blk, (v & 1) ? 2 : 6, $sformatf("answer block for %0d", v));
        chk(up_rsp.data, (v & 1) ? 16'h1111 : 16'h2222, $sformatf("answer data for %0d", v));
      end
      chk(dn_rsp_ready, (v & 1) ? 1 : (v == 2 ? 2 : 0), $sformatf("answer taken for %0d", v));
      up_rsp_ready = 0; #1;
      chk(dn_rsp_ready, 0, "no answer taken when the side above is not ready");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
