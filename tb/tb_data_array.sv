// tb_data_array: writes random words to random addresses of the 64x16 data
// array and checks every read against a software copy.
module tb_data_array;
  int checks = 0, failures = 0;
  logic clk = 0, we = 0;
  logic [5:0] waddr = '0, raddr = '0;
  logic [15:0] wdata = '0, rdata;
  logic [15:0] ref_mem [64];
  logic [63:0] valid = '0;

  always #5 clk = ~clk;
  data_array dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      we = ($urandom % 2) == 0; waddr = 6'($urandom); wdata = 16'($urandom);
      raddr = 6'($urandom);
      #1;
      if (valid[raddr]) begin
        checks++;
        if (rdata !== ref_mem[raddr]) begin failures++; $display("addr %0d: %h vs %h", raddr, rdata, ref_mem[raddr]); end
      end
      @(posedge clk);
      if (we) begin ref_mem[waddr] = wdata; valid[waddr] = 1'b1; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
