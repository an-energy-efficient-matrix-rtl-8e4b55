// tb_adder_merger: checks both merge modes of the 8-input tree. Bit-plane
// mode is checked on the worked example of 16 8-bit data (130, 85, 49, ...,
// 23) times a binary vector: the data are split into bit-planes, each
// plane's binary inner product is counted in software, and the merged result
// must equal the direct integer inner product. Random inputs check both
// modes against software sums.
module tb_adder_merger;
  int checks = 0, failures = 0;
  logic [7:0][3:0] in;
  logic bitplane;
  logic [11:0] out;

  adder_merger dut (.*);

  initial begin
    #100000 failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int data [16];
    int vec [16];
    // printed start and end of the example; the middle is random
    for (int i = 0; i < 16; i++) begin data[i] = $urandom % 256; vec[i] = $urandom % 2; end
    data[0] = 130; data[1] = 85; data[2] = 49; data[15] = 23;
    vec[0] = 1; vec[1] = 1; vec[2] = 0; vec[15] = 1;
    for (int rep = 0; rep < 50; rep++) begin
      int direct, maxplane;
      direct = 0; maxplane = 0;
      if (rep > 0) for (int i = 0; i < 16; i++) begin data[i] = $urandom % 256; vec[i] = $urandom % 2; end
      if (rep == 1) vec[0] = 0;  // keep at least one product away from 16 per plane
      for (int i = 0; i < 16; i++) direct += data[i] * vec[i];
      for (int b = 0; b < 8; b++) begin
        int s;
        s = 0;
        for (int i = 0; i < 16; i++) s += ((data[i] >> b) & 1) * vec[i];
        if (s > maxplane) maxplane = s;
        in[b] = 4'(s);
      end
      bitplane = 1; #1;
      if (maxplane < 16) begin
        checks++;
        if (out !== 12'(direct)) begin failures++; $display("bit-plane: %0d vs %0d", out, direct); end
      end
    end
    for (int t = 0; t < 200; t++) begin
      int e1, e0;
      e1 = 0; e0 = 0;
      for (int b = 0; b < 8; b++) begin in[b] = 4'($urandom); e1 += int'(in[b]) << b; e0 += int'(in[b]); end
      bitplane = 1; #1;
      checks++; if (out !== 12'(e1)) begin failures++; $display("weighted %0d vs %0d", out, e1); end
      bitplane = 0; #1;
      checks++; if (out !== 12'(e0)) begin failures++; $display("sum %0d vs %0d", out, e0); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
