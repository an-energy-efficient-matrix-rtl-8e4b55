// tb_sram_array: checks reset to zero, writes, and the two independent read
// ports of the 16-word result SRAM against a software copy.
module tb_sram_array;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1, we = 0;
  logic [3:0] waddr = '0, raddr_a = '0, raddr_b = '0;
  logic [15:0] wdata = '0, rdata_a, rdata_b;
  logic [15:0] ref_mem [16];

  always #5 clk = ~clk;
  initial #1 rst_n = 0;  // a real falling edge, so the asynchronous reset acts
  sram_array dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) ref_mem[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      we = ($urandom % 3) == 0; waddr = 4'($urandom); wdata = 16'($urandom);
      raddr_a = 4'($urandom); raddr_b = 4'($urandom);
      #1;
      checks += 2;
      if (rdata_a !== ref_mem[raddr_a]) begin failures++; $display("A %0d", raddr_a); end
      if (rdata_b !== ref_mem[raddr_b]) begin failures++; $display("B %0d", raddr_b); end
      @(posedge clk);
      if (we) ref_mem[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
