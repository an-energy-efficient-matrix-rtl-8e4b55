// tb_xima_pair: runs one data/logic pair through the whole protocol with
// instructions only. The vector phi is stored in the data array and moved
// into the digitizing layer (SW move = configure logic), 16 word-line rows
// are stored directly into the input layer, ST starts the logic, WT holds
// the queue, the 16 row results are read with LW and also written back to
// the data array by SW and read from there. Every result is compared with a
// software popcount; the time from ST to the first answer must cover the
// 3 cycles per row of the logic block.
module tb_xima_pair;
  import xima_pkg::*;
  localparam int N = 16, ROWS = 16;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1;
  logic in_valid = 0, in_ready, rsp_valid, rsp_ready = 1, busy, done, wt_stall;
  instr_t in_instr = '0;
  logic [DATA_W-1:0] rsp_data, merge_data;
  logic [3:0] merge_addr = '0;
  logic [N-1:0] phi;
  logic [N-1:0] x [ROWS];
  logic [DATA_W-1:0] rsps [$];
  int rsp_times [$];
  int st_time, stall_cycles = 0;

  always #5 clk = ~clk;
  initial #1 rst_n = 0;  // a real falling edge, so the asynchronous reset acts
  xima_pair dut (.*);

  always @(posedge clk) begin
    if (rsp_valid && rsp_ready) begin rsps.push_back(rsp_data); rsp_times.push_back($time); end
    if (wt_stall) stall_cycles++;
  end

  function automatic addr_t A(input logic m, input int layer, input int a);
    A.blk = '0; A.mod = module_e'(m); A.layer = LAYER_W'(layer); A.inaddr = INADDR_W'(a);
  endfunction

  task automatic send(input op_e op, input logic [DATA_W-1:0] op1, input addr_t op2);
    @(negedge clk);
    in_valid = 1; in_instr.op = op; in_instr.op1 = op1; in_instr.op2 = op2;
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    #1 in_valid = 0;
  endtask

  task automatic chk(input logic [31:0] g, input logic [31:0] e, input string what);
    checks++;
    if (g !== e) begin failures++; $display("FAIL %s: got %0d exp %0d", what, g, e); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    phi = 16'($urandom);
    send(OP_SW_DATA, phi, A(0, 0, 40));
    send(OP_SW_MOVE, DATA_W'(A(0, 0, 40)), A(1, LAYER_DIGIT, 0));
    for (int r = 0; r < ROWS; r++) begin
      x[r] = 16'($urandom);
      send(OP_SW_DATA, x[r], A(1, LAYER_INPUT, r));
    end
    send(OP_ST, 16'd0, '0);
    st_time = $time;
    send(OP_WT, 16'd0, '0);
    for (int r = 0; r < ROWS; r++) send(OP_LW, DATA_W'(A(1, LAYER_ENCODE, r)), '0);
    for (int r = 0; r < ROWS; r++) send(OP_SW_MOVE, DATA_W'(A(1, LAYER_ENCODE, r)), A(0, 0, r));
    for (int r = 0; r < ROWS; r++) send(OP_LW, DATA_W'(A(0, 0, r)), '0);
    repeat (20) @(posedge clk);
    chk(rsps.size(), 2 * ROWS, "answers");
    if (rsps.size() == 2 * ROWS) begin
      for (int r = 0; r < ROWS; r++) begin
        int s;
        s = $countones(x[r] & phi) % N;
        chk(rsps[r], s, $sformatf("row %0d from logic", r));
        chk(rsps[ROWS + r], s, $sformatf("row %0d from data array", r));
      end
      chk((rsp_times[0] - st_time) / 10 >= 3 * ROWS, 1, "first answer after 3*ROWS cycles");
    end
    chk(stall_cycles >= 3 * ROWS - 2, 1, "WT held the queue");
    merge_addr = 4'd7; #1;
    chk(merge_data, $countones(x[7] & phi) % N, "merge port");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
