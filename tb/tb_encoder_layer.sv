// tb_encoder_layer: checks the 8-to-3 look-up table of the encoder (one-hot
// column k -> code of k+1, the last row reading 000), the all-zero input,
// a reconfigured row, and the 16-row default (k -> (k+1) mod 16).
module tb_encoder_layer;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1;
  logic       we8 = 0;
  logic [2:0] row8 = '0, code_in8 = '0, code8;
  logic [7:0] o2_8 = '0;
  logic [15:0] o2_16 = '0;
  logic [3:0]  code16;
  // expected table, one entry per printed row 10000000 .. 00000001
  logic [2:0] lut [8] = '{3'b001, 3'b010, 3'b011, 3'b100, 3'b101, 3'b110, 3'b111, 3'b000};

  always #5 clk = ~clk;
  initial #1 rst_n = 0;  // a real falling edge, so the asynchronous reset acts

  encoder_layer #(.N(8), .W(3)) dut8 (
    .clk(clk), .rst_n(rst_n), .cfg_we(we8), .cfg_row(row8), .cfg_code(code_in8),
    .o2(o2_8), .code(code8));
  encoder_layer dut16 (
    .clk(clk), .rst_n(rst_n), .cfg_we(1'b0), .cfg_row(4'd0), .cfg_code(4'd0),
    .o2(o2_16), .code(code16));

  task automatic chk(input logic [3:0] got, input logic [3:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %0d exp %0d", what, got, exp); end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int k = 0; k < 8; k++) begin
      o2_8 = 8'(1 << k); #1;
      chk({1'b0, code8}, {1'b0, lut[k]}, $sformatf("8-3 row %0d", k));
    end
    o2_8 = '0; #1;
    chk({1'b0, code8}, 4'd0, "no row active");
    for (int k = 0; k < 16; k++) begin
      o2_16 = 16'(1 << k); #1;
      chk(code16, 4'((k + 1) % 16), $sformatf("16-row %0d", k));
    end
    // reconfigure row 2 of the 8-row encoder
    @(negedge clk); we8 = 1; row8 = 3'd2; code_in8 = 3'b110;
    @(negedge clk); we8 = 0;
    o2_8 = 8'b0000_0100; #1;
    chk({1'b0, code8}, 4'b0110, "reconfigured row");
    o2_8 = 8'b0000_1000; #1;
    chk({1'b0, code8}, 4'b0100, "neighbour row untouched");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
