// tb_control_bus: drives one pair's control bus with a program of SW, LW,
// ST and WT instructions. The data array is the real one; the logic block is
// a small model in this testbench (it records configuration writes, answers
// reads with a pattern, and after a start stays busy for 20 cycles while
// writing 16 row results). Checked: immediate and move writes reach the right
// target, LW answers in order with the right word, results move from the
// SRAM to the data array, WT holds the queue until the logic is idle, an LW
// waits while the previous answer is not taken, illegal data addresses are
// ignored, and instructions run one per clock.
module tb_control_bus;
  import xima_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1;
  logic in_valid = 0, in_ready;
  instr_t in_instr = '0;
  logic rsp_valid, rsp_ready = 1;
  logic [DATA_W-1:0] rsp_data;
  logic da_we;
  logic [INADDR_W-1:0] da_waddr, da_raddr;
  logic [DATA_W-1:0] da_wdata, da_rdata;
  logic lg_wr_en, lg_start;
  layer_e lg_wr_layer, lg_rd_layer;
  logic [INADDR_W-1:0] lg_wr_addr, lg_rd_addr;
  logic [DATA_W-1:0] lg_wr_data, lg_rd_data;
  logic lg_busy, res_we, wt_stall;
  logic [INADDR_W-1:0] res_addr;
  logic [DATA_W-1:0] res_data;
  logic [3:0] merge_addr = '0;
  logic [DATA_W-1:0] merge_data;

  always #5 clk = ~clk;
  initial #1 rst_n = 0;  // a real falling edge, so the asynchronous reset acts

  control_bus dut (.*);
  data_array u_da (.clk(clk), .we(da_we), .waddr(da_waddr), .wdata(da_wdata),
                   .raddr(da_raddr), .rdata(da_rdata));

  // logic block model
  int busy_cnt = 0;
  logic [DATA_W-1:0] last_wr_data;
  layer_e last_wr_layer;
  logic [INADDR_W-1:0] last_wr_addr;
  int n_lg_wr = 0, n_start = 0, busy_end_time = 0, stall_cycles = 0;
  assign lg_busy    = busy_cnt != 0;
  assign lg_rd_data = 16'hA000 | DATA_W'({lg_rd_layer, lg_rd_addr});
  assign res_we     = busy_cnt > 4;
  assign res_addr   = INADDR_W'(20 - busy_cnt);
  assign res_data   = DATA_W'(16'h0100 + (20 - busy_cnt));
  always @(posedge clk) begin
    if (lg_start) begin busy_cnt <= 20; n_start++; end
    else if (busy_cnt != 0) begin
      busy_cnt <= busy_cnt - 1;
      if (busy_cnt == 1) busy_end_time = $time;
    end
    if (lg_wr_en) begin
      n_lg_wr++; last_wr_data <= lg_wr_data; last_wr_layer <= lg_wr_layer; last_wr_addr <= lg_wr_addr;
    end
    if (wt_stall) stall_cycles++;
  end

  // answers
  logic [DATA_W-1:0] rsps [$];
  int rsp_times [$];
  always @(posedge clk) if (rsp_valid && rsp_ready) begin rsps.push_back(rsp_data); rsp_times.push_back($time); end

  function automatic addr_t A(input logic m, input int layer, input int a);
    A.blk = '0; A.mod = module_e'(m); A.layer = LAYER_W'(layer); A.inaddr = INADDR_W'(a);
  endfunction

  task automatic send(input op_e op, input logic [DATA_W-1:0] op1, input addr_t op2);
    @(negedge clk);
    in_valid = 1; in_instr.op = op; in_instr.op1 = op1; in_instr.op2 = op2;
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    @(negedge clk); in_valid = 0;
  endtask

  task automatic chk(input logic [31:0] g, input logic [31:0] e, input string what);
    checks++;
    if (g !== e) begin failures++; $display("FAIL %s: got %h exp %h", what, g, e); end
  endtask

  task automatic drain();
    repeat (40) @(posedge clk);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int t0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // immediate store to data array and read back
    send(OP_SW_DATA, 16'h1234, A(0, 0, 3));
    send(OP_SW_DATA, 16'h5678, A(0, 0, 4));
    send(OP_LW, DATA_W'(A(0, 0, 4)), '0);
    send(OP_LW, DATA_W'(A(0, 0, 3)), '0);
    drain();
    chk(rsps.size(), 2, "two answers");
    if (rsps.size() == 2) begin
      chk(rsps[0], 16'h5678, "LW addr 4");
      chk(rsps[1], 16'h1234, "LW addr 3");
    end
    // immediate configuration of logic layer 1
    send(OP_SW_DATA, 16'hBEEF, A(1, 1, 0));
    drain();
    chk(n_lg_wr, 1, "one logic write");
    chk(last_wr_data, 16'hBEEF, "logic write data");
    chk(last_wr_layer, LAYER_DIGIT, "logic write layer");
    // move from the data array into input layer row 7
    send(OP_SW_MOVE, DATA_W'(A(0, 0, 3)), A(1, 0, 7));
    drain();
    chk(last_wr_data, 16'h1234, "move data->logic data");
    chk(last_wr_layer, LAYER_INPUT, "move data->logic layer");
    chk(last_wr_addr, 7, "move data->logic row");
    // move from a logic layer into the data array, read back
    send(OP_SW_MOVE, DATA_W'(A(1, 2, 5)), A(0, 0, 9));
    send(OP_LW, DATA_W'(A(0, 0, 9)), '0);
    drain();
    chk(rsps[2], 16'hA000 | {LAYER_XOR, 6'd5}, "move logic->data");
    // illegal data address: layer field nonzero -> write dropped
    send(OP_SW_DATA, 16'hDEAD, A(0, 2, 3));
    send(OP_LW, DATA_W'(A(0, 0, 3)), '0);
    drain();
    chk(rsps[3], 16'h1234, "illegal write dropped");
    // ST, WT, then LW of a result: the answer comes only after the logic is idle
    rsps.delete(); rsp_times.delete();
    stall_cycles = 0;
    send(OP_ST, 16'd0, '0);
    send(OP_WT, 16'd0, '0);
    send(OP_LW, DATA_W'(A(1, 3, 2)), '0);
    send(OP_SW_MOVE, DATA_W'(A(1, 3, 5)), A(0, 0, 10));
    send(OP_LW, DATA_W'(A(0, 0, 10)), '0);
    drain();
    chk(n_start, 1, "one start");
    chk(rsps.size(), 2, "two answers after WT");
    if (rsps.size() == 2) begin
      chk(rsps[0], 16'h0102, "result row 2 from SRAM");
      chk(rsps[1], 16'h0105, "result row 5 written back");
      chk(rsp_times[0] > busy_end_time, 1, "LW held until logic idle");
    end
    chk(stall_cycles > 10, 1, "WT stalled the queue");
    chk(merge_data, 16'h0100, "merge port row 0");
    // answer back-pressure: second LW waits while the first is not taken
    rsps.delete();
    @(negedge clk); rsp_ready = 0;
    send(OP_LW, DATA_W'(A(0, 0, 4)), '0);
    send(OP_LW, DATA_W'(A(0, 0, 3)), '0);
    repeat (10) @(posedge clk);
    chk(rsp_valid, 1, "answer held");
    chk(rsp_data, 16'h5678, "held answer is the first");
    @(negedge clk); rsp_ready = 1;
    drain();
    chk(rsps.size(), 2, "both answers after release");
    if (rsps.size() == 2) chk(rsps[1], 16'h1234, "second answer");
    // throughput: four immediate stores back to back take four cycles
    @(negedge clk);
    t0 = 0;
    for (int i = 0; i < 4; i++) begin
      in_valid = 1; in_instr.op = OP_SW_DATA; in_instr.op1 = DATA_W'(i + 40); in_instr.op2 = A(0, 0, 20 + i);
      @(negedge clk);
    end
    in_valid = 0;
    repeat (4) @(negedge clk);
    for (int i = 0; i < 4; i++) begin
      send(OP_LW, DATA_W'(A(0, 0, 20 + i)), '0);
    end
    drain();
    for (int i = 0; i < 4; i++) chk(rsps[2 + i], DATA_W'(i + 40), "back-to-back store");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
