// xima_logic: the in-memory logic block of one data/logic pair, a stack of
// four crossbar layers that multiplies a binary matrix by a binary vector.
//
//   layer 0, input data  : ROWS word-line patterns x_r (N bits each)
//   layer 1, digitizing  : N x N RRAM crossbar storing the vector phi in every
//                          column, with a ladder of sense thresholds
//   layer 2, XOR         : transition detection of the thermometer code
//   layer 3, encoding    : one-hot to binary, one pre-configured word per row
//
// After start, every row r of the input layer is driven onto the word lines
// and its inner product s_r = x_r . phi is produced in three steps, one clock
// each, as the source describes (digitize, XOR, encode): row r's result is
// written to the pair's SRAM array (res_we/res_addr/res_data) in the third
// cycle, so a full pass takes exactly 3*ROWS cycles from start to done. The
// steps of successive rows are not overlapped, which is what the source's
// cycle count (3 cycles per matrix row) implies.
//
// Configuration writes (wr_*) address a layer and a word within it: layer 0
// word r sets x_r; layer 1 word 0 programs phi and word k+1 sets the sense
// threshold code of column k (half-steps; reset gives the ladder 2k+1);
// layer 3 word k sets the code of encoder row k. Layer 2 holds no state and
// ignores writes. Reads (rd_*, combinational) return x_r, phi, a threshold
// code or the last XOR output; results are read from the SRAM array, not
// from here. Which address holds what, the
// start/busy/done handshake and the registers between the steps are this
// design's choices. Writes while busy are not blocked; the control bus holds
// them back only when the program places a WT first.
module xima_logic
  import xima_pkg::*;
#(
  parameter int unsigned N    = XB_N,
  parameter int unsigned ROWS = XB_ROWS,
  parameter int unsigned W    = (N > 1) ? $clog2(N) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  // configuration
  input  logic                wr_en,
  input  layer_e              wr_layer,
  input  logic [INADDR_W-1:0] wr_addr,
  input  logic [DATA_W-1:0]   wr_data,
  input  layer_e              rd_layer,
  input  logic [INADDR_W-1:0] rd_addr,
  output logic [DATA_W-1:0]   rd_data,
  // computation
  input  logic                start,
  output logic                busy,
  output logic                done,
  output logic                res_we,
  output logic [INADDR_W-1:0] res_addr,
  output logic [DATA_W-1:0]   res_data
);

  typedef enum logic [1:0] {S_IDLE, S_DIGITIZE, S_XOR, S_ENCODE} step_e;

  localparam int unsigned RW      = (ROWS > 1) ? $clog2(ROWS) : 1;
  localparam int unsigned TH_BITS = 8;

  logic [N-1:0] x_rows [ROWS];
  logic [N-1:0] phi_q;
  step_e        step;
  logic [RW-1:0] row;
  logic [N-1:0] o1, o1_q, o2, o2_q;
  logic [W-1:0] code;

  wire x_we   = wr_en && (wr_layer == LAYER_INPUT) && (wr_addr < INADDR_W'(ROWS));
  wire phi_we = wr_en && (wr_layer == LAYER_DIGIT) && (wr_addr == '0);
  wire th_we  = wr_en && (wr_layer == LAYER_DIGIT) && (wr_addr != '0) && (wr_addr <= INADDR_W'(N));
  logic [INADDR_W-1:0] th_idx, th_rd_idx;
  logic [N-1:0][TH_BITS-1:0] th_q;
  assign th_idx    = wr_addr - 1'b1;
  assign th_rd_idx = rd_addr - 1'b1;
  wire enc_we = wr_en && (wr_layer == LAYER_ENCODE) && (wr_addr < INADDR_W'(N));

  // layer 0: input data
  always_ff @(posedge clk) begin
    if (x_we) x_rows[wr_addr[RW-1:0]] <= wr_data[N-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      phi_q <= '0;
    else if (phi_we) phi_q <= wr_data[N-1:0];
  end

  // layer 1: digitizing crossbar
  rram_digitize_xbar #(.N(N), .TH_W(TH_BITS)) u_digit (
    .clk    (clk),
    .rst_n  (rst_n),
    .cfg_we (phi_we),
    .cfg_phi(wr_data[N-1:0]),
    .th_we  (th_we),
    .th_col (th_idx[$clog2(N)-1:0]),
    .th_code(wr_data[TH_BITS-1:0]),
    .th_q   (th_q),
    .wl     ((step == S_DIGITIZE) ? x_rows[row] : '0),
    .o1     (o1)
  );

  // layer 2: XOR
  xor_layer #(.N(N)) u_xor (.o1(o1_q), .o2(o2));

  // layer 3: encoder
  encoder_layer #(.N(N), .W(W)) u_enc (
    .clk     (clk),
    .rst_n   (rst_n),
    .cfg_we  (enc_we),
    .cfg_row (wr_addr[$clog2(N)-1:0]),
    .cfg_code(wr_data[W-1:0]),
    .o2      (o2_q),
    .code    (code)
  );

  // three-step sequencer
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      step <= S_IDLE;
      row  <= '0;
      o1_q <= '0;
      o2_q <= '0;
    end else begin
      unique case (step)
        S_IDLE: if (start) begin
          step <= S_DIGITIZE;
          row  <= '0;
        end
        S_DIGITIZE: begin
          o1_q <= o1;
          step <= S_XOR;
        end
        S_XOR: begin
          o2_q <= o2;
          step <= S_ENCODE;
        end
        S_ENCODE: begin
          if (row == RW'(ROWS - 1)) begin
            step <= S_IDLE;
          end else begin
            row  <= row + 1'b1;
            step <= S_DIGITIZE;
          end
        end
      endcase
    end
  end

  assign busy     = (step != S_IDLE);
  assign done     = (step == S_ENCODE) && (row == RW'(ROWS - 1));
  assign res_we   = (step == S_ENCODE);
  assign res_addr = INADDR_W'(row);
  assign res_data = DATA_W'(code);

  always_comb begin
    unique case (rd_layer)
      LAYER_INPUT:  rd_data = (rd_addr < INADDR_W'(ROWS)) ? DATA_W'(x_rows[rd_addr[RW-1:0]]) : '0;
      LAYER_DIGIT:  rd_data = (rd_addr == '0) ? DATA_W'(phi_q) :
                              (rd_addr <= INADDR_W'(N)) ? DATA_W'(th_q[th_rd_idx[$clog2(N)-1:0]]) : '0;
      LAYER_XOR:    rd_data = DATA_W'(o2_q);
      default:      rd_data = '0;
    endcase
  end

endmodule
