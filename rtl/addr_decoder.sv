// addr_decoder: splits an instruction address into the index of the target
// and checks it against the address layout
//     | block index | module | layer index | in-layer address |
// where module 0 is the data array (its layer field must be all zero) and
// module 1 is the in-memory logic (the layer field picks one of its layers).
// The layout follows the source's address table; the field widths come from
// xima_pkg. Purely combinational.
module addr_decoder
  import xima_pkg::*;
(
  input  addr_t               addr,
  output logic [BLK_W-1:0]    blk,
  output logic                to_data,   // targets the data array
  output logic                to_logic,  // targets a logic layer
  output layer_e              layer,
  output logic [INADDR_W-1:0] row,       // word (crossbar row) in the target
  output logic                legal
);

  always_comb begin
    blk      = addr.blk;
    layer    = layer_e'(addr.layer);
    row      = addr.inaddr;
    legal    = (addr.mod == MOD_LOGIC) || (addr.layer == '0);
    to_data  = (addr.mod == MOD_DATA) && legal;
    to_logic = (addr.mod == MOD_LOGIC);
  end

endmodule
