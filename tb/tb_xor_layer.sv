// tb_xor_layer: checks the transition-detection layer on every thermometer
// code of a 16-column crossbar and on the 8-column example 11111000 ->
// 00001000 (leftmost printed bit = column 0). The expected one-hot vector is
// built directly from s, independently of the gate equations.
module tb_xor_layer;
  int checks = 0, failures = 0;
  logic [15:0] o1, o2;
  logic [7:0]  p1, p2;

  xor_layer #(.N(16)) dut (.o1(o1), .o2(o2));
  xor_layer #(.N(8))  dut8 (.o1(p1), .o2(p2));

  initial begin
    #100000 failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int s = 0; s <= 16; s++) begin
      logic [15:0] exp;
      o1  = (s == 0) ? 16'h0 : 16'((32'h1 << s) - 1);
      exp = (s == 0) ? 16'h0 : 16'(32'h1 << (s - 1));
      #1;
      checks++;
      if (o2 !== exp) begin failures++; $display("s=%0d o2=%b exp=%b", s, o2, exp); end
    end
    // column k = printed position k+1 from the left
    p1 = 8'b0001_1111;  // printed 11111000
    #1;
    checks++;
    if (p2 !== 8'b0001_0000) begin failures++; $display("example: %b", p2); end  // printed 00001000
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
