// instr_queue: the instruction queue of a pair's control bus, a first-in
// first-out buffer of instructions issued by the external processor.
//
// Valid/ready on both sides: an instruction enters when in_valid and
// in_ready are high at a rising edge, and leaves when out_valid and
// out_ready are. It can be written and read in the same cycle when full.
// The depth (4 entries) and the handshake are this design's choices.
module instr_queue
  import xima_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  output logic   in_ready,
  input  instr_t in_instr,
  output logic   out_valid,
  input  logic   out_ready,
  output instr_t out_instr
);

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  instr_t          buf_q [DEPTH];
  logic [PW-1:0]   rd_ptr, wr_ptr;
  logic [PW:0]     count;

  wire push = in_valid && in_ready;
  wire pop  = out_valid && out_ready;

  assign out_valid = (count != '0);
  assign in_ready  = (count != (PW+1)'(DEPTH)) || out_ready;
  assign out_instr = buf_q[rd_ptr];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) begin
        wr_ptr <= (wr_ptr == PW'(DEPTH - 1)) ? '0 : wr_ptr + 1'b1;
      end
      if (pop) begin
        rd_ptr <= (rd_ptr == PW'(DEPTH - 1)) ? '0 : rd_ptr + 1'b1;
      end
      count <= count + (PW+1)'(push) - (PW+1)'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (push) buf_q[wr_ptr] <= in_instr;
  end

  assert property (@(posedge clk) disable iff (!rst_n) count <= (PW+1)'(DEPTH))
    else $error("instruction queue overflow");

endmodule
