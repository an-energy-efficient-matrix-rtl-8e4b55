// tb_rram_digitize_xbar: checks that the crossbar model turns an inner
// product s = x . phi into a thermometer code with its first s columns at 1:
// the worked example [11011111].[11111001] -> 11111000 (s = 5) on an 8x8
// crossbar, then random vectors on the 16x16 default, then with two column
// thresholds reprogrammed. The reference counts the common ones in software.
module tb_rram_digitize_xbar;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1;
  logic th_we = 0;
  logic [3:0] th_col = '0;
  logic [7:0] th_code = '0;
  logic [7:0][7:0]  th8;
  logic [15:0][7:0] th16;
  logic        we8 = 0, we16 = 0;
  logic [7:0]  phi8 = '0, x8 = '0, o8;
  logic [15:0] phi16 = '0, x16 = '0, o16;

  always #5 clk = ~clk;
  initial #1 rst_n = 0;

  rram_digitize_xbar #(.N(8)) dut8 (.clk(clk), .rst_n(rst_n), .cfg_we(we8), .cfg_phi(phi8),
    .th_we(1'b0), .th_col(3'd0), .th_code(8'd0), .th_q(th8), .wl(x8), .o1(o8));
  rram_digitize_xbar dut16 (.clk(clk), .rst_n(rst_n), .cfg_we(we16), .cfg_phi(phi16),
    .th_we(th_we), .th_col(th_col), .th_code(th_code), .th_q(th16), .wl(x16), .o1(o16));

  function automatic logic [15:0] therm(input int s);
    logic [15:0] t = '0;
    for (int k = 0; k < s; k++) t[k] = 1'b1;
    return t;
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    // printed vectors, leftmost element = index 0
    @(negedge clk); we8 = 1; phi8 = 8'b1001_1111;  // 1 1 1 1 1 0 0 1
    @(negedge clk); we8 = 0;
    x8 = 8'b1111_1011;                             // 1 1 0 1 1 1 1 1
    #1;
    checks++;
    if (o8 !== 8'b0001_1111) begin failures++; $display("example: %b", o8); end
    for (int t = 0; t < 200; t++) begin
      int s;
      @(negedge clk); we16 = 1; phi16 = 16'($urandom); x16 = 16'($urandom);
      if (t % 10 == 0) phi16 = 16'hFFFF;
      if (t % 10 == 0) x16   = 16'hFFFF;  // s = N: every column fires
      @(negedge clk); we16 = 0;
      #1;
      s = $countones(phi16 & x16);
      checks++;
      if (o16 !== therm(s)) begin failures++; $display("s=%0d o=%b", s, o16); end
    end
    // reconfigured thresholds: column 3 fires from s >= 9 (code 17), column 0
    // from s >= 2 (code 3); the other columns keep the ladder
    @(negedge clk); th_we = 1; th_col = 4'd3; th_code = 8'd17;
    @(negedge clk); th_col = 4'd0; th_code = 8'd3;
    @(negedge clk); th_we = 0;
    checks++;
    if (th16[3] !== 8'd17 || th16[5] !== 8'd11) begin failures++; $display("threshold codes"); end
    for (int t = 0; t < 100; t++) begin
      int s;
      logic [15:0] e;
      @(negedge clk); we16 = 1; phi16 = 16'($urandom); x16 = 16'($urandom);
      @(negedge clk); we16 = 0;
      #1;
      s = $countones(phi16 & x16);
      e = therm(s);
      e[3] = (s >= 9);
      e[0] = (s >= 2);
      checks++;
      if (o16 !== e) begin failures++; $display("reconfigured s=%0d o=%b", s, o16); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
