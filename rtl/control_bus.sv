// control_bus: the in-pair CMOS control bus that sits between a pair's data
// array and its in-memory logic.
//
// Instructions from the processor enter the instruction queue and are
// executed strictly in order (first come, first served), one per clock:
// the instruction decoder turns the head of the queue into actions, two
// address decoders split its source and destination addresses, and the
// word moves in the same cycle over the data path (combinational reads,
// write at the clock edge). Reads may come from the data array, from logic
// layers 0..2, or, for layer 3, from the SRAM array that holds the logic's
// row results; writes go to the data array or configure a logic layer.
// So SW data->logic configures the logic and SW logic(layer 3)->data writes
// results back, as in the source's protocol.
//
// Hold conditions: WT stays at the head of the queue while the logic is
// busy; LW stays there while an earlier answer has not yet been taken
// (rsp_valid && !rsp_ready). ST gives the logic a one-cycle start pulse.
// An SW move reads its source in this pair whatever Addr1's block field says
// (the bus is local to the pair). Writes to an illegal address (data array
// with a nonzero layer field) are dropped and reads of one return 0. These
// rules, the one-instruction-per-cycle timing and the response register are
// this design's choices; the source names the units and their roles only.
module control_bus
  import xima_pkg::*;
#(
  parameter int unsigned QDEPTH = 4,
  parameter int unsigned ROWS   = XB_ROWS
) (
  input  logic                clk,
  input  logic                rst_n,
  // from the block decoder
  input  logic                in_valid,
  output logic                in_ready,
  input  instr_t              in_instr,
  // answers to LW
  output logic                rsp_valid,
  input  logic                rsp_ready,
  output logic [DATA_W-1:0]   rsp_data,
  // data array
  output logic                da_we,
  output logic [INADDR_W-1:0] da_waddr,
  output logic [DATA_W-1:0]   da_wdata,
  output logic [INADDR_W-1:0] da_raddr,
  input  logic [DATA_W-1:0]   da_rdata,
  // in-memory logic
  output logic                lg_wr_en,
  output layer_e              lg_wr_layer,
  output logic [INADDR_W-1:0] lg_wr_addr,
  output logic [DATA_W-1:0]   lg_wr_data,
  output layer_e              lg_rd_layer,
  output logic [INADDR_W-1:0] lg_rd_addr,
  input  logic [DATA_W-1:0]   lg_rd_data,
  output logic                lg_start,
  input  logic                lg_busy,
  input  logic                res_we,
  input  logic [INADDR_W-1:0] res_addr,
  input  logic [DATA_W-1:0]   res_data,
  // second SRAM read port, for the adder-merger
  input  logic [$clog2(ROWS)-1:0] merge_addr,
  output logic [DATA_W-1:0]       merge_data,
  // observation
  output logic                wt_stall
);

  localparam int unsigned RW = $clog2(ROWS);

  instr_t head;
  logic   head_valid, head_pop;

  instr_queue #(.DEPTH(QDEPTH)) u_queue (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (in_valid),
    .in_ready (in_ready),
    .in_instr (in_instr),
    .out_valid(head_valid),
    .out_ready(head_pop),
    .out_instr(head)
  );

  addr_t             src, dst;
  logic [DATA_W-1:0] wdata_imm;
  logic              src_rd, dst_wr, use_imm, respond, start, wait_done;
  logic [BLK_W-1:0]  start_blk;

  instr_decoder u_idec (
    .instr    (head),
    .src      (src),
    .dst      (dst),
    .wdata_imm(wdata_imm),
    .src_rd   (src_rd),
    .dst_wr   (dst_wr),
    .use_imm  (use_imm),
    .respond  (respond),
    .start    (start),
    .wait_done(wait_done),
    .start_blk(start_blk)
  );

  logic                src_data, src_logic, src_legal;
  logic                dst_data, dst_logic, dst_legal;
  layer_e              src_layer, dst_layer;
  logic [INADDR_W-1:0] src_row, dst_row;
  logic [BLK_W-1:0]    src_blk, dst_blk;

  addr_decoder u_src_dec (
    .addr(src), .blk(src_blk), .to_data(src_data), .to_logic(src_logic),
    .layer(src_layer), .row(src_row), .legal(src_legal)
  );
  addr_decoder u_dst_dec (
    .addr(dst), .blk(dst_blk), .to_data(dst_data), .to_logic(dst_logic),
    .layer(dst_layer), .row(dst_row), .legal(dst_legal)
  );

  // SRAM array: results of the logic block
  logic [DATA_W-1:0] sram_rdata;

  sram_array #(.W(DATA_W), .DEPTH(ROWS)) u_sram (
    .clk    (clk),
    .rst_n  (rst_n),
    .we     (res_we),
    .waddr  (res_addr[RW-1:0]),
    .wdata  (res_data),
    .raddr_a(src_row[RW-1:0]),
    .rdata_a(sram_rdata),
    .raddr_b(merge_addr),
    .rdata_b(merge_data)
  );

  // source word
  logic [DATA_W-1:0] src_word;
  always_comb begin
    if (src_data)
      src_word = da_rdata;
    else if (src_logic && src_layer == LAYER_ENCODE)
      src_word = (src_row < INADDR_W'(ROWS)) ? sram_rdata : '0;
    else if (src_logic)
      src_word = lg_rd_data;
    else
      src_word = '0;
  end

  // hold conditions
  logic rsp_busy;
  assign rsp_busy = rsp_valid && !rsp_ready;
  assign wt_stall = head_valid && wait_done && lg_busy;
  assign head_pop = head_valid && !(wait_done && lg_busy) && !(respond && rsp_busy);

  wire exec = head_pop;

  assign da_raddr    = src_row;
  assign lg_rd_layer = src_layer;
  assign lg_rd_addr  = src_row;

  assign da_we       = exec && dst_wr && dst_data;
  assign da_waddr    = dst_row;
  assign da_wdata    = use_imm ? wdata_imm : src_word;

  assign lg_wr_en    = exec && dst_wr && dst_logic;
  assign lg_wr_layer = dst_layer;
  assign lg_wr_addr  = dst_row;
  assign lg_wr_data  = use_imm ? wdata_imm : src_word;

  assign lg_start    = exec && start;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rsp_valid <= 1'b0;
      rsp_data  <= '0;
    end else if (exec && respond) begin
      rsp_valid <= 1'b1;
      rsp_data  <= src_word;
    end else if (rsp_ready) begin
      rsp_valid <= 1'b0;
    end
  end

  // An SW move is local to the pair: its source must name the same block as
  // its destination (the block decoder routes by the destination).
  assert property (@(posedge clk) disable iff (!rst_n)
                   exec && src_rd && dst_wr |-> src_blk == dst_blk)
    else $error("SW move across pairs: source block %0d, destination block %0d", src_blk, dst_blk);

endmodule
