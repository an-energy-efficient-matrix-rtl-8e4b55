// tb_instr_decoder: checks the actions decoded for each instruction of the
// protocol (SW move, SW immediate, LW, ST, WT, NOP) and the operand routing.
module tb_instr_decoder;
  import xima_pkg::*;
  int checks = 0, failures = 0;
  instr_t instr;
  addr_t src, dst;
  logic [DATA_W-1:0] wdata_imm;
  logic src_rd, dst_wr, use_imm, respond, start, wait_done;
  logic [BLK_W-1:0] start_blk;

  instr_decoder dut (.*);

  task automatic expect_acts(input logic [5:0] e, input string what);
    logic [5:0] g;
    g = {src_rd, dst_wr, use_imm, respond, start, wait_done};
    checks++;
    if (g !== e) begin failures++; $display("FAIL %s: %b vs %b", what, g, e); end
  endtask

  initial begin
    #100000 failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int t = 0; t < 50; t++) begin
      instr.op1 = 16'($urandom); instr.op2 = addr_t'(ADDR_W'($urandom));
      instr.op = OP_SW_MOVE; #1; expect_acts(6'b110000, "SW move");
      checks += 2;
      if (src !== addr_t'(instr.op1[ADDR_W-1:0])) failures++;
      if (dst !== instr.op2) failures++;
      instr.op = OP_SW_DATA; #1; expect_acts(6'b011000, "SW data");
      checks++; if (wdata_imm !== instr.op1) failures++;
      instr.op = OP_LW;      #1; expect_acts(6'b100100, "LW");
      instr.op = OP_ST;      #1; expect_acts(6'b000010, "ST");
      checks++; if (start_blk !== instr.op1[BLK_W-1:0]) failures++;
      instr.op = OP_WT;      #1; expect_acts(6'b000001, "WT");
      instr.op = OP_NOP;     #1; expect_acts(6'b000000, "NOP");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
