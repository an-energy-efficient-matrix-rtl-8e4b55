// xima_pkg: types and constants shared by the in-memory matrix-multiply
// accelerator (a processor-attached memory whose data/logic pairs compute
// binary inner products inside RRAM crossbars).
//
// The instruction set (SW, LW, ST, WT) and the layout of an address
// (block index, data/logic select, layer index, in-layer address) follow the
// accelerator's communication protocol. The field widths, the numeric opcode
// values and the split of SW into a "move" and an "immediate" form are this
// design's own choices.
package xima_pkg;

  // Crossbar size: an N x N digitizing crossbar computes one inner product of
  // two N-bit binary vectors (result 0..N).
  localparam int unsigned XB_N      = 16;
  // Rows of the input-data layer: one 16x16 binary matrix per logic block.
  localparam int unsigned XB_ROWS   = 16;
  // Width of a data word moved over the control bus (one crossbar row).
  localparam int unsigned DATA_W    = 16;

  // Address fields: | block index | module | layer index | in-layer address |
  localparam int unsigned BLK_W     = 3;   // up to 8 data/logic pairs
  localparam int unsigned LAYER_W   = 2;   // 4 logic layers
  localparam int unsigned INADDR_W  = 6;   // 64 words per layer / data array
  localparam int unsigned ADDR_W    = BLK_W + 1 + LAYER_W + INADDR_W;

  // Layers of the in-memory logic block, in stacking order.
  typedef enum logic [LAYER_W-1:0] {
    LAYER_INPUT  = 2'd0,  // input data: word-line patterns, one per row
    LAYER_DIGIT  = 2'd1,  // digitizing crossbar: stored column vector
    LAYER_XOR    = 2'd2,  // transition detection (no stored state)
    LAYER_ENCODE = 2'd3   // encoder rows (write) / row results (read)
  } layer_e;

  // Module select bit of an address.
  typedef enum logic {
    MOD_DATA  = 1'b0,
    MOD_LOGIC = 1'b1
  } module_e;

  typedef struct packed {
    logic [BLK_W-1:0]    blk;
    module_e             mod;
    logic [LAYER_W-1:0]  layer;   // must be 0 for the data array
    logic [INADDR_W-1:0] inaddr;
  } addr_t;

  typedef enum logic [2:0] {
    OP_NOP     = 3'd0,
    OP_SW_MOVE = 3'd1,  // SW Addr1 Addr2 : copy the word at Addr1 to Addr2
    OP_SW_DATA = 3'd2,  // SW Data Addr   : store an immediate word to Addr
    OP_LW      = 3'd3,  // LW Addr        : read the word at Addr
    OP_ST      = 3'd4,  // ST Block Idx   : start the logic block computing
    OP_WT      = 3'd5   // WT             : hold the queue until the logic is done
  } op_e;

  // op1 carries Addr1 (SW move, LW), the data word (SW immediate) or the
  // block index (ST) in its low bits; op2 carries Addr2 / Addr.
  typedef struct packed {
    op_e               op;
    logic [DATA_W-1:0] op1;
    addr_t             op2;
  } instr_t;

  localparam int unsigned INSTR_W = $bits(instr_t);

  // Response to an LW: the word read and the pair it came from.
  typedef struct packed {
    logic [BLK_W-1:0]  blk;
    logic [DATA_W-1:0] data;
  } rsp_t;

  function automatic addr_t op1_as_addr(input logic [DATA_W-1:0] op1);
    return addr_t'(op1[ADDR_W-1:0]);
  endfunction

endpackage
