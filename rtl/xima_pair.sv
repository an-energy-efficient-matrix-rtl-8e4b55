// xima_pair: one local data/logic pair of the accelerator, a data array and
// an in-memory logic block joined by their own control bus.
//
// The processor's instructions for this pair arrive through the block
// decoder; the control bus executes them against the data array (plain
// storage) and the logic block (the crossbar stack that computes ROWS inner
// products of N-bit binary vectors after an ST). Row results land in the
// control bus's SRAM array, readable by LW, movable to the data array by SW,
// and visible to the adder-merger through merge_addr/merge_data.
// The pairing follows the source; sizes come from xima_pkg unless overridden.
module xima_pair
  import xima_pkg::*;
#(
  parameter int unsigned N      = XB_N,
  parameter int unsigned ROWS   = XB_ROWS,
  parameter int unsigned QDEPTH = 4
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  output logic                    in_ready,
  input  instr_t                  in_instr,
  output logic                    rsp_valid,
  input  logic                    rsp_ready,
  output logic [DATA_W-1:0]       rsp_data,
  input  logic [$clog2(ROWS)-1:0] merge_addr,
  output logic [DATA_W-1:0]       merge_data,
  output logic                    busy,
  output logic                    done,
  output logic                    wt_stall
);

  logic                da_we;
  logic [INADDR_W-1:0] da_waddr, da_raddr;
  logic [DATA_W-1:0]   da_wdata, da_rdata;

  logic                lg_wr_en, lg_start, res_we;
  layer_e              lg_wr_layer, lg_rd_layer;
  logic [INADDR_W-1:0] lg_wr_addr, lg_rd_addr, res_addr;
  logic [DATA_W-1:0]   lg_wr_data, lg_rd_data, res_data;

  control_bus #(.QDEPTH(QDEPTH), .ROWS(ROWS)) u_cbus (
    .clk        (clk),
    .rst_n      (rst_n),
    .in_valid   (in_valid),
    .in_ready   (in_ready),
    .in_instr   (in_instr),
    .rsp_valid  (rsp_valid),
    .rsp_ready  (rsp_ready),
    .rsp_data   (rsp_data),
    .da_we      (da_we),
    .da_waddr   (da_waddr),
    .da_wdata   (da_wdata),
    .da_raddr   (da_raddr),
    .da_rdata   (da_rdata),
    .lg_wr_en   (lg_wr_en),
    .lg_wr_layer(lg_wr_layer),
    .lg_wr_addr (lg_wr_addr),
    .lg_wr_data (lg_wr_data),
    .lg_rd_layer(lg_rd_layer),
    .lg_rd_addr (lg_rd_addr),
    .lg_rd_data (lg_rd_data),
    .lg_start   (lg_start),
    .lg_busy    (busy),
    .res_we     (res_we),
    .res_addr   (res_addr),
    .res_data   (res_data),
    .merge_addr (merge_addr),
    .merge_data (merge_data),
    .wt_stall   (wt_stall)
  );

  data_array #(.W(DATA_W), .DEPTH(2 ** INADDR_W)) u_data (
    .clk  (clk),
    .we   (da_we),
    .waddr(da_waddr),
    .wdata(da_wdata),
    .raddr(da_raddr),
    .rdata(da_rdata)
  );

  xima_logic #(.N(N), .ROWS(ROWS)) u_logic (
    .clk     (clk),
    .rst_n   (rst_n),
    .wr_en   (lg_wr_en),
    .wr_layer(lg_wr_layer),
    .wr_addr (lg_wr_addr),
    .wr_data (lg_wr_data),
    .rd_layer(lg_rd_layer),
    .rd_addr (lg_rd_addr),
    .rd_data (lg_rd_data),
    .start   (lg_start),
    .busy    (busy),
    .done    (done),
    .res_we  (res_we),
    .res_addr(res_addr),
    .res_data(res_data)
  );

endmodule
