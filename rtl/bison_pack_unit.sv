// bison_pack_unit: the pre-processing half of bs.pack, which compresses data to a narrower
// element width.
//
// src1 holds n_elem unsigned elements of b1 bits each (element i at bit i*b1). The unit
// keeps the low cw bits of each and places them back to back:
//   slice = sum_{i < n_elem} (src1_elem[i] mod 2^cw) * 2^(i*cw)
// The slice, n_elem*cw bits wide, goes to the mask unit, which merges it into the packed
// destination register at the offset given by cnt_o. With the published pack presets
// (eight 8-bit elements to 1, 2 or 4 bits) eight, four or two bs.pack instructions fill one
// 64-bit register.
//
// Purely combinational; at most MAX_PACK elements per instruction. Element values are
// expected to fit the target width: higher bits are dropped, not saturated. The function
// follows the published design; truncation and the MAX_PACK bound are this design's choices.
module bison_pack_unit
  import bison_pkg::*;
#(
  parameter int unsigned MAX_PACK = 8  // elements converted per bs.pack
) (
  input  logic [XLEN-1:0] src1,
  input  cfg_t            cfg,
  output logic [XLEN-1:0] slice
);

  always_comb begin
    logic [XLEN-1:0] e;
    slice = '0;
    for (int unsigned i = 0; i < MAX_PACK; i++) begin
      e = (src1 >> (32'(i) * 32'(cfg.b1))) & ones({1'b0, cfg.cw});
      if (FW'(i) < cfg.n_elem) slice = slice | (e << (32'(i) * 32'(cfg.cw)));
    end
  end

endmodule
