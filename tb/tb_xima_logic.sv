// tb_xima_logic: configures a 16x16 logic block (vector phi in the
// digitizing layer, 16 random word-line rows in the input layer), starts it,
// and checks every row result against a software popcount (mod 16, the
// 4-bit encoder aliasing s = 16 to 0), the result order, and the run time of
// exactly 3 cycles per row. A second run with a reprogrammed encoder row and
// read-back of the configuration layers (vector, rows, threshold codes)
// follow.
module tb_xima_logic;
  import xima_pkg::*;
  localparam int N = 16, ROWS = 16;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1;
  logic wr_en = 0, start = 0;
  layer_e wr_layer = LAYER_INPUT, rd_layer = LAYER_INPUT;
  logic [INADDR_W-1:0] wr_addr = '0, rd_addr = '0, res_addr;
  logic [DATA_W-1:0] wr_data = '0, rd_data, res_data;
  logic busy, done, res_we;
  logic [N-1:0] x [ROWS];
  logic [N-1:0] phi;
  logic [DATA_W-1:0] got [ROWS];
  int nres;

  always #5 clk = ~clk;
  initial #1 rst_n = 0;  // a real falling edge, so the asynchronous reset acts

  xima_logic #(.N(N), .ROWS(ROWS)) dut (.*);

  task automatic chk(input logic [DATA_W-1:0] g, input logic [DATA_W-1:0] e, input string what);
    checks++;
    if (g !== e) begin failures++; $display("FAIL %s: got %0d exp %0d", what, g, e); end
  endtask

  task automatic wr(input layer_e l, input int a, input logic [DATA_W-1:0] d);
    @(negedge clk); wr_en = 1; wr_layer = l; wr_addr = INADDR_W'(a); wr_data = d;
    @(negedge clk); wr_en = 0;
  endtask

  always @(posedge clk) if (res_we) begin
    got[res_addr[3:0]] <= res_data;
    chk(DATA_W'(res_addr), DATA_W'(nres), "result order");
    nres <= nres + 1;
  end

  task automatic run_and_check(input int enc_row, input int enc_code);
    int cyc;
    nres = 0;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cyc = 0;
    while (busy) begin cyc++; @(negedge clk); end
    chk(DATA_W'(cyc), DATA_W'(3 * ROWS), "cycles for a full pass");
    chk(DATA_W'(nres), DATA_W'(ROWS), "rows written");
    for (int r = 0; r < ROWS; r++) begin
      int s = $countones(x[r] & phi);
      int e = (s - 1 == enc_row) ? enc_code : (s % N);
      chk(got[r], DATA_W'(e), $sformatf("row %0d (s=%0d)", r, s));
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    phi = 16'($urandom) | 16'h00F0;
    wr(LAYER_DIGIT, 0, DATA_W'(phi));
    for (int r = 0; r < ROWS; r++) begin
      x[r] = 16'($urandom);
      if (r == 0) x[r] = '0;      // s = 0
      if (r == 1) x[r] = phi;     // s = |phi|
      wr(LAYER_INPUT, r, DATA_W'(x[r]));
    end
    // read back the configuration layers
    rd_layer = LAYER_DIGIT; rd_addr = '0; #1;
    chk(rd_data, DATA_W'(phi), "phi read-back");
    rd_layer = LAYER_INPUT; rd_addr = 6'd5; #1;
    chk(rd_data, DATA_W'(x[5]), "row 5 read-back");
    rd_layer = LAYER_DIGIT; rd_addr = 6'd4; #1;
    chk(rd_data, 16'd7, "column 3 threshold code after reset");
    run_and_check(-1, 0);
    // threshold configuration through layer 1, word k+1
    wr(LAYER_DIGIT, 16, 16'd40);
    rd_layer = LAYER_DIGIT; rd_addr = 6'd16; #1;
    chk(rd_data, 16'd40, "column 15 threshold code written");
    wr(LAYER_DIGIT, 16, 16'd31);
    rd_addr = 6'd0; #1;
    chk(rd_data, DATA_W'(phi), "phi unchanged by threshold write");
    // all-ones vector makes row 1 reach s = 16 -> aliases to 0
    phi = '1;
    wr(LAYER_DIGIT, 0, DATA_W'(phi));
    wr(LAYER_INPUT, 1, 16'hFFFF);
    x[1] = 16'hFFFF;
    // encoder row 2 (s = 3) reprogrammed to 9
    wr(LAYER_ENCODE, 2, 16'd9);
    x[3] = 16'h0007;
    wr(LAYER_INPUT, 3, 16'h0007);
    run_and_check(2, 9);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
