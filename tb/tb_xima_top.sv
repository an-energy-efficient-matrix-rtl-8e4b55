// tb_xima_top: end-to-end test of the accelerator at its default size
// (8 pairs, 16x16 crossbars, 16 rows per pair), driven only through the
// processor's command port and the adder-merger port.
//
// Pass 1, bit-plane mode: a 16x16 matrix of 8-bit data times a binary
// vector of 16. Pair b holds bit-plane b of every data row in its input
// layer; the vector is stored into pair 0's data array and copied into each
// pair's digitizing layer with SW moves (pairs 1..7 get it as an immediate).
// ST starts all pairs, WT is broadcast, the row results are read back with
// LW, written back to the data arrays with SW moves, and the adder-merger
// output of every row is compared with the integer product computed here.
// Row 0 is forced to an inner product of 16 in one plane, which the 4-bit
// encoder reads as 0: the expected value models that.
//
// Pass 2, sub-vector mode: a 128-element binary vector is split over the 8
// pairs, and the plain sum of the pairs' results must equal the full inner
// product.
//
// Mechanisms counted (each must occur): WT holding a queue, command
// back-pressure, two pairs answering in the same cycle, SW move in both
// directions, both merge modes, the s = N encoder wrap, and the 3*ROWS-cycle
// run time of every pair.
module tb_xima_top;
  import xima_pkg::*;
  localparam int P = 8, N = 16, ROWS = 16;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1;
  logic cmd_valid = 0, cmd_ready, rsp_valid;
  instr_t cmd = '0;
  rsp_t rsp;
  logic [3:0] merge_row = '0;
  logic merge_bitplane = 1;
  logic [11:0] merge_result;
  logic [P-1:0] busy;

  always #5 clk = ~clk;
  initial #1 rst_n = 0;

  xima_top dut (.*);

  // event counters
  int n_wt_stall = 0, n_backpressure = 0, n_rsp_conflict = 0, n_move_to_logic = 0;
  int n_move_to_data = 0, n_bitplane = 0, n_subvector = 0, n_wrap = 0, n_cycle_ok = 0;
  int busy_start [P], busy_len [P];
  rsp_t rsps [$];

  always @(posedge clk) begin
    if (|dut.pr_wt_stall) n_wt_stall++;
    if (cmd_valid && !cmd_ready) n_backpressure++;
    if ($countones(dut.pr_rsp_valid) > 1) n_rsp_conflict++;
    if (rsp_valid) rsps.push_back(rsp);
  end

  for (genvar p = 0; p < P; p++) begin : g_mon
    always @(posedge clk) begin
      if (dut.g_pair[p].u_pair.lg_start) busy_start[p] = $time;
      if (dut.g_pair[p].u_pair.done) busy_len[p] = ($time - busy_start[p]) / 10;
    end
  end

  function automatic addr_t A(input int blk, input logic m, input int layer, input int a);
    A.blk = BLK_W'(blk); A.mod = module_e'(m); A.layer = LAYER_W'(layer); A.inaddr = INADDR_W'(a);
  endfunction

  task automatic send(input op_e op, input logic [DATA_W-1:0] op1, input addr_t op2);
    @(negedge clk);
    cmd_valid = 1; cmd.op = op; cmd.op1 = op1; cmd.op2 = op2;
    @(posedge clk);
    while (!cmd_ready) @(posedge clk);
    #1 cmd_valid = 0;
  endtask

  task automatic chk(input int g, input int e, input string what);
    checks++;
    if (g !== e) begin failures++; $display("FAIL %s: got %0d exp %0d", what, g, e); end
  endtask

  task automatic run_all();
    for (int p = 0; p < P; p++) send(OP_ST, DATA_W'(p), '0);
    send(OP_WT, '0, '0);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int data [ROWS][N];
    logic [N-1:0] vec;
    logic [N-1:0] plane [P][ROWS];
    int exp_rows [ROWS];
    logic [N-1:0] sub [P];
    logic [N-1:0] xs [P][ROWS];

    repeat (3) @(negedge clk);
    rst_n = 1;

    // ---------------- pass 1: bit-plane multiplication ----------------
    vec = 16'($urandom) | 16'h8001;
    for (int r = 0; r < ROWS; r++)
      for (int i = 0; i < N; i++) data[r][i] = $urandom % 256;
    for (int b = 0; b < P; b++)
      for (int r = 0; r < ROWS; r++)
        for (int i = 0; i < N; i++) plane[b][r][i] = 1'((data[r][i] >> b) & 1);
    send(OP_SW_DATA, vec, A(0, 0, 0, 61));
    // pair 0 takes its vector by an SW move from its data array
    send(OP_SW_MOVE, DATA_W'(A(0, 0, 0, 61)), A(0, 1, LAYER_DIGIT, 0));
    n_move_to_logic++;
    for (int p = 1; p < P; p++) send(OP_SW_DATA, vec, A(p, 1, LAYER_DIGIT, 0));
    for (int r = 0; r < ROWS; r++)
      for (int b = 0; b < P; b++) send(OP_SW_DATA, plane[b][r], A(b, 1, LAYER_INPUT, r));
    rsps.delete();
    run_all();
    // read rows 3 and 4 from every pair: the answers queue up behind the WT
    // and collide when the pairs finish
    for (int p = 0; p < P; p++) begin
      send(OP_LW, DATA_W'(A(p, 1, LAYER_ENCODE, 3)), '0);
      send(OP_LW, DATA_W'(A(p, 1, LAYER_ENCODE, 4)), '0);
    end
    // write all results back into each pair's data array, then read one back
    for (int p = 0; p < P; p++)
      for (int r = 0; r < ROWS; r++) begin
        send(OP_SW_MOVE, DATA_W'(A(p, 1, LAYER_ENCODE, r)), A(p, 0, 0, r));
        n_move_to_data++;
      end
    for (int p = 0; p < P; p++) send(OP_LW, DATA_W'(A(p, 0, 0, 5)), '0);
    repeat (20) @(posedge clk);

    // expected plane results (4-bit, s = 16 would read as 0)
    for (int r = 0; r < ROWS; r++) begin
      exp_rows[r] = 0;
      for (int b = 0; b < P; b++) exp_rows[r] += ($countones(plane[b][r] & vec) % N) << b;
    end
    chk(rsps.size(), 3 * P, "answers in pass 1");
    begin
      int seen [P];
      int rows_of [3] = '{3, 4, 5};
      for (int p = 0; p < P; p++) seen[p] = 0;
      foreach (rsps[k]) begin
        int p, r;
        p = int'(rsps[k].blk);
        if (seen[p] < 3) begin
          r = rows_of[seen[p]];
          chk(rsps[k].data, $countones(plane[p][r] & vec) % N, $sformatf("answer %0d of pair %0d", seen[p], p));
        end
        seen[p]++;
      end
    end
    merge_bitplane = 1;
    for (int r = 0; r < ROWS; r++) begin
      int direct;
      merge_row = 4'(r); #1;
      chk(merge_result, exp_rows[r] % 4096, $sformatf("bit-plane merge row %0d", r));
      n_bitplane++;
      // compare with the plain integer product when no plane wrapped
      begin
        logic wrapped;
        direct = 0; wrapped = 0;
        for (int i = 0; i < N; i++) direct += data[r][i] * int'(vec[i]);
        for (int b = 0; b < P; b++) if ($countones(plane[b][r] & vec) == N) wrapped = 1;
        if (!wrapped) chk(merge_result, direct, $sformatf("integer product row %0d", r));
      end
    end
    for (int p = 0; p < P; p++) begin
      chk(busy_len[p], 3 * ROWS, $sformatf("pair %0d run length", p));
      if (busy_len[p] == 3 * ROWS) n_cycle_ok++;
    end

    // ---------------- pass 2: sub-vector merge ----------------
    for (int p = 0; p < P; p++) begin
      sub[p] = (p == 3) ? '1 : 16'($urandom);
      send(OP_SW_DATA, sub[p], A(p, 1, LAYER_DIGIT, 0));
      for (int r = 0; r < ROWS; r++) begin
        xs[p][r] = 16'($urandom);
        if (p == 3 && r == 2) xs[p][r] = '1;   // with sub[3] all ones: s = N
        send(OP_SW_DATA, xs[p][r], A(p, 1, LAYER_INPUT, r));
      end
    end
    run_all();
    rsps.delete();
    send(OP_LW, DATA_W'(A(7, 1, LAYER_ENCODE, 15)), '0);  // queued behind WT
    wait (rsps.size() == 1);
    chk(rsps[0].data, $countones(sub[7] & xs[7][15]) % N, "LW after pass 2");
    repeat (2) @(posedge clk);
    merge_bitplane = 0;
    for (int r = 0; r < ROWS; r++) begin
      int full;
      full = 0;
      for (int p = 0; p < P; p++) begin
        if ($countones(sub[p] & xs[p][r]) == N) n_wrap++;
        full += $countones(sub[p] & xs[p][r]) % N;
      end
      merge_row = 4'(r); #1;
      chk(merge_result, full, $sformatf("sub-vector merge row %0d", r));
      if (merge_result != 12'(full))
        for (int p = 0; p < P; p++) $display("  pair %0d: got %0d exp %0d", p, dut.pr_merge_data[p], $countones(sub[p] & xs[p][r]) % N);
      n_subvector++;
    end

    // every mechanism must have happened
    chk(n_wt_stall > 0, 1, "WT stall seen");
    chk(n_backpressure > 0, 1, "command back-pressure seen");
    chk(n_rsp_conflict > 0, 1, "simultaneous answers seen");
    chk(n_move_to_logic > 0, 1, "SW move data->logic");
    chk(n_move_to_data > 0, 1, "SW move logic->data");
    chk(n_bitplane > 0, 1, "bit-plane merge");
    chk(n_subvector > 0, 1, "sub-vector merge");
    chk(n_wrap > 0, 1, "s = N encoder wrap");
    chk(n_cycle_ok == P, 1, "3*ROWS run time in every pair");
    $display("events: wt_stall=%0d backpressure=%0d rsp_conflict=%0d move_to_logic=%0d move_to_data=%0d bitplane=%0d subvector=%0d wrap=%0d",
             n_wt_stall, n_backpressure, n_rsp_conflict, n_move_to_logic, n_move_to_data, n_bitplane, n_subvector, n_wrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
