// tb_workload_matmul: a binary matrix product C = A * B run on the
// accelerator at its default size (8 pairs, 16x16 crossbars, 16 rows per
// pair), with the processor side played by this testbench.
//
// Sizes: A is M x D, B is D x K, both binary; every entry of C is an integer
// inner product of length D. Two sizes are run: the evaluation setup
// 328 x 356 * 356 x 64, and the largest image dimension of the scalability
// study, D = 864; the dimensions between differ only in D.
//
// Mapping: D is cut into sub-vectors of 16 (the last one zero-padded), and
// eight consecutive sub-vectors form one group, pair p holding sub-vector p of
// the group. For each block of 16 rows of A and each group, the 16 row
// segments are written once into every pair's input layer; then, for every
// column of B, the column's sub-vectors are written to the pairs'
// digitizing layers, ST starts all pairs, WT waits for them, and the
// adder-merger in sub-vector mode gives the group's partial sum for each of
// the 16 rows. The testbench adds the group sums, as the processor would.
//
// Check: every entry of C equals the exact product. A sub-vector inner
// product of 16 reads as 0 in the 4-bit encoder; the expected value models
// that, and entries where it happened are counted separately (with random
// half-dense data it is vanishingly rare).
module tb_workload_matmul;
  import xima_pkg::*;
  localparam int M = 328, K = 64, DMAX = 864;
  localparam int NDIM = 2;
  localparam int DIMS [NDIM] = '{356, 864};
  localparam int P = 8, N = 16, ROWS = 16;
  localparam int RB = (M + ROWS - 1) / ROWS;   // blocks of rows
  int D, C, G;                                 // C sub-vectors in G groups of P

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1;
  logic cmd_valid = 0, cmd_ready, rsp_valid;
  instr_t cmd = '0;
  rsp_t rsp;
  logic [3:0] merge_row = '0;
  logic merge_bitplane = 0;
  logic [11:0] merge_result;
  logic [P-1:0] busy;

  always #5 clk = ~clk;
  initial #1 rst_n = 0;

  xima_top dut (.*);

  int n_rsp = 0;
  longint busy_cycles = 0, total_cycles = 0;
  always @(posedge clk) begin
    if (rsp_valid) n_rsp++;
    if (rst_n) total_cycles++;
    if (|busy) busy_cycles++;
  end

  logic a_m [M][DMAX];
  logic b_m [DMAX][K];
  int acc [M][K];

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

  // bits [c*N +: N] of row r of A, or of column k of B; zero past the edges
  function automatic logic [N-1:0] seg_a(input int r, input int c);
    seg_a = '0;
    if (r < M)
      for (int i = 0; i < N; i++)
        if (c * N + i < D) seg_a[i] = a_m[r][c * N + i];
  endfunction

  function automatic logic [N-1:0] seg_b(input int k, input int c);
    seg_b = '0;
    for (int i = 0; i < N; i++)
      if (c * N + i < D) seg_b[i] = b_m[c * N + i][k];
  endfunction

  initial begin
    repeat (8000000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int wrapped_entries, exact_entries, n_seen;
    longint busy0, total0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    for (int di = 0; di < NDIM; di++) begin
      D = DIMS[di]; C = (D + N - 1) / N; G = (C + P - 1) / P;
      busy0 = busy_cycles; total0 = total_cycles;
      for (int r = 0; r < M; r++) for (int i = 0; i < D; i++) a_m[r][i] = 1'($urandom);
      for (int i = 0; i < D; i++) for (int k = 0; k < K; k++) b_m[i][k] = 1'($urandom);
      for (int r = 0; r < M; r++) for (int k = 0; k < K; k++) acc[r][k] = 0;

      for (int rb = 0; rb < RB; rb++)
        for (int g = 0; g < G; g++) begin
          for (int p = 0; p < P; p++)
            for (int r = 0; r < ROWS; r++)
              send(OP_SW_DATA, seg_a(rb * ROWS + r, g * P + p), A(p, 1, LAYER_INPUT, r));
          for (int k = 0; k < K; k++) begin
            for (int p = 0; p < P; p++) send(OP_SW_DATA, seg_b(k, g * P + p), A(p, 1, LAYER_DIGIT, 0));
            for (int p = 0; p < P; p++) send(OP_ST, DATA_W'(p), '0);
            send(OP_WT, '0, '0);
            // an LW queued behind the WT answers once every pair is done
            n_seen = n_rsp;
            send(OP_LW, DATA_W'(A(P - 1, 1, LAYER_ENCODE, 0)), '0);
            wait (n_rsp > n_seen);
            @(negedge clk);
            for (int r = 0; r < ROWS; r++) begin
              merge_row = 4'(r); #1;
              if (rb * ROWS + r < M) acc[rb * ROWS + r][k] += int'(merge_result);
            end
          end
        end

      wrapped_entries = 0; exact_entries = 0;
      for (int r = 0; r < M; r++)
        for (int k = 0; k < K; k++) begin
          int exact, modelled;
          exact = 0; modelled = 0;
          for (int c = 0; c < C; c++) begin
            int s;
            s = $countones(seg_a(r, c) & seg_b(k, c));
            exact += s;
            modelled += s % N;
          end
          checks++;
          if (acc[r][k] != modelled) begin
            failures++;
            if (failures < 10) $display("FAIL C[%0d][%0d]: got %0d exp %0d", r, k, acc[r][k], modelled);
          end
          if (modelled != exact) wrapped_entries++;
          else if (acc[r][k] == exact) exact_entries++;
        end
      checks++;
      if (exact_entries + wrapped_entries != M * K) begin
        failures++; $display("FAIL exact entries %0d of %0d", exact_entries, M * K);
      end
      $display("workload %0dx%0d * %0dx%0d: %0d entries, %0d exact, %0d with a wrapped sub-vector",
               M, D, D, K, M * K, exact_entries, wrapped_entries);
      $display("passes=%0d  crossbar busy cycles=%0d  total cycles=%0d  busy cycles per column of B=%0d",
               RB * G * K, busy_cycles - busy0, total_cycles - total0, (busy_cycles - busy0) / K);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
