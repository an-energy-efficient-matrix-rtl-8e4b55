// tb_block_decoder: checks that SW, LW and ST reach only the pair named by
// their block index, that WT goes to all pairs and waits until all can take
// it, that NOP and commands for missing pairs are dropped, and that answers
// from several pairs are passed one at a time, lowest pair first, tagged
// with their source.
module tb_block_decoder;
  import xima_pkg::*;
  localparam int P = 6;  // fewer pairs than block indices: 6 and 7 are absent
  int checks = 0, failures = 0;
  logic cmd_valid = 0, cmd_ready, rsp_valid;
  instr_t cmd = '0;
  rsp_t rsp;
  logic [P-1:0] pr_valid, pr_ready = '1, pr_rsp_valid = '0, pr_rsp_ready;
  instr_t pr_instr;
  logic [P-1:0][DATA_W-1:0] pr_rsp_data;

  block_decoder #(.NUM_PAIRS(P)) dut (.*);

  task automatic chk(input logic [31:0] g, input logic [31:0] e, input string what);
    checks++;
    if (g !== e) begin failures++; $display("FAIL %s: got %h exp %h", what, g, e); end
  endtask

  function automatic addr_t A(input int b);
    A = '0; A.blk = BLK_W'(b);
  endfunction

  initial begin
    #100000 failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int p = 0; p < P; p++) pr_rsp_data[p] = DATA_W'(16'hC000 + p);
    cmd_valid = 1;
    for (int b = 0; b < 8; b++) begin
      logic [P-1:0] e;
      e = (b < P) ? P'(1 << b) : '0;
      cmd.op = OP_SW_DATA; cmd.op1 = 16'h55; cmd.op2 = A(b); #1;
      chk(pr_valid, e, $sformatf("SW imm to %0d", b));
      chk(cmd_ready, 1, "ready");
      cmd.op = OP_SW_MOVE; cmd.op1 = DATA_W'(A((b + 1) % 8)); cmd.op2 = A(b); #1;
      chk(pr_valid, e, $sformatf("SW move to %0d", b));
      cmd.op = OP_LW; cmd.op1 = DATA_W'(A(b)); cmd.op2 = A((b + 3) % 8); #1;
      chk(pr_valid, e, $sformatf("LW from %0d", b));
      cmd.op = OP_ST; cmd.op1 = DATA_W'(b); cmd.op2 = '0; #1;
      chk(pr_valid, e, $sformatf("ST %0d", b));
      chk(pr_instr, cmd, "instruction passed through");
    end
    // back-pressure of the selected pair only
    pr_ready = P'(6'b111011);
    cmd.op = OP_SW_DATA; cmd.op2 = A(2); #1;
    chk(cmd_ready, 0, "selected pair busy");
    cmd.op2 = A(3); #1;
    chk(cmd_ready, 1, "other pair free");
    // WT broadcast
    cmd.op = OP_WT; #1;
    chk(pr_valid, '0, "WT waits for all pairs");
    chk(cmd_ready, 0, "WT not accepted");
    pr_ready = '1; #1;
    chk(pr_valid, P'(6'b111111), "WT to all pairs");
    chk(cmd_ready, 1, "WT accepted");
    cmd.op = OP_NOP; #1;
    chk(pr_valid, '0, "NOP dropped");
    chk(cmd_ready, 1, "NOP consumed");
    cmd_valid = 0; cmd.op = OP_SW_DATA; #1;
    chk(pr_valid, '0, "no valid, no command");
    // answers
    pr_rsp_valid = P'(6'b101100); #1;
    chk(rsp_valid, 1, "answer valid");
    chk(rsp.blk, 2, "lowest pair first");
    chk(rsp.data, 16'hC002, "its data");
    chk(pr_rsp_ready, P'(6'b000100), "only that pair released");
    pr_rsp_valid = P'(6'b101000); #1;
    chk(rsp.blk, 3, "next pair");
    pr_rsp_valid = P'(6'b100000); #1;
    chk(rsp.blk, 5, "last pair");
    chk(rsp.data, 16'hC005, "its data");
    pr_rsp_valid = '0; #1;
    chk(rsp_valid, 0, "no answer");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
