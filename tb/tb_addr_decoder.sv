// tb_addr_decoder: checks field extraction and the legality rule (a data
// array address must have an all-zero layer field) on every combination of
// module and layer with random block and in-layer fields.
module tb_addr_decoder;
  import xima_pkg::*;
  int checks = 0, failures = 0;
  addr_t addr;
  logic [BLK_W-1:0] blk;
  logic to_data, to_logic, legal;
  layer_e layer;
  logic [INADDR_W-1:0] row;

  addr_decoder dut (.*);

  initial begin
    #100000 failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int t = 0; t < 400; t++) begin
      logic m;
      logic [1:0] l;
      logic [2:0] b;
      logic [5:0] a;
      m = 1'($urandom); l = 2'($urandom); b = 3'($urandom); a = 6'($urandom);
      addr = {b, m, l, a};   // block | module | layer | in-layer address
      #1;
      checks += 5;
      if (blk !== b) failures++;
      if (row !== a) failures++;
      if (layer !== layer_e'(l)) failures++;
      if (to_logic !== m) failures++;
      if (to_data !== (!m && l == 2'd0)) failures++;
      checks++;
      if (legal !== (m || l == 2'd0)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
