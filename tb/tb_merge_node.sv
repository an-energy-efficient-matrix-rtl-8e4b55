// tb_merge_node: checks a + (b << shift) on random operands, 12-bit wrap
// included, against software arithmetic.
module tb_merge_node;
  int checks = 0, failures = 0;
  logic [11:0] a, b, out;
  logic [2:0] shift;

  merge_node #(.W(12), .SW(3)) dut (.*);

  initial begin
    #100000 failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      int e;
      a = 12'($urandom); b = 12'($urandom); shift = 3'($urandom);
      #1;
      e = (int'(a) + (int'(b) << shift)) % 4096;
      checks++;
      if (out !== 12'(e)) begin failures++; $display("%0d + %0d<<%0d = %0d", a, b, shift, out); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
