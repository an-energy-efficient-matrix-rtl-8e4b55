// tb_instr_queue: pushes and pops random instructions with random stalls on
// both sides and checks order and content against a software queue, that the
// queue refuses a fifth entry while full and nothing is leaving, and that
// it reports empty correctly.
module tb_instr_queue;
  import xima_pkg::*;
  int checks = 0, failures = 0, fulls = 0;
  logic clk = 0, rst_n = 1;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  instr_t in_instr = '0, out_instr;
  instr_t q [$];

  always #5 clk = ~clk;
  initial #1 rst_n = 0;  // a real falling edge, so the asynchronous reset acts
  instr_queue dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    #1;
    checks++; if (out_valid) begin failures++; $display("not empty after reset"); end
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      in_valid  = ($urandom % 3) != 0;
      in_instr  = instr_t'(INSTR_W'({$urandom, $urandom}));
      out_ready = (t < 200) ? 1'b0 : (($urandom % 2) == 0);
      #1;
      checks++;
      if (out_valid != (q.size() != 0)) begin failures++; $display("out_valid wrong at %0d", t); end
      if (q.size() == 4 && !out_ready) begin
        fulls++;
        checks++;
        if (in_ready) begin failures++; $display("accepts while full"); end
      end
      if (out_valid && out_ready) begin
        checks++;
        if (out_instr !== q[0]) begin failures++; $display("order/content wrong at %0d", t); end
      end
      @(posedge clk);
      if (out_valid && out_ready) void'(q.pop_front());
      if (in_valid && in_ready) q.push_back(in_instr);
    end
    checks++; if (fulls == 0) begin failures++; $display("never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
