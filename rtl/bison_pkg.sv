// bison_pkg: types and constants shared by the BiSon-e binary-segmentation unit.
//
// Binary segmentation packs n narrow unsigned integers into one machine word, element i at
// bit i*cw, where the clustering width cw leaves guard bits so that a single 64-bit integer
// multiplication yields a whole inner product or linear convolution without carries
// crossing element boundaries.
//
// This package holds:
//   * the instruction codes of the five custom instructions (bs.set, bs.pack, bs.ip,
//     bs.lc.l, bs.lc.h);
//   * the control-register layout (cfg_t) and its encoding in the bs.set source operand;
//   * the preset configurations of the "Extend" and "Pack" rows of the published control
//     table (8- to 1-bit extend, 8-bit to 1/2/4-bit pack), as functions.
// The instruction set and the preset numbers follow the published design. The binary
// encodings (opcode values, bit positions of the fields in the bs.set operand, 7-bit fields)
// are this design's own choice.
package bison_pkg;

  localparam int unsigned XLEN = 64;  // register and multiplier operand width
  localparam int unsigned FW   = 7;   // width of every control-register field (values 0..127)

  // Custom instructions.
  typedef enum logic [2:0] {
    OP_SET  = 3'd0,  // load the control register from src1, clear cnt_i and cnt_o
    OP_PACK = 3'd1,  // compress src1 elements to the target width, merge into src2 at cnt_o
    OP_IP   = 3'd2,  // inner product of the cnt_i-th input-clusters of src1 and src2
    OP_LCL  = 3'd3,  // lower ic_dim elements of the linear convolution of the clusters
    OP_LCH  = 3'd4   // higher ic_dim-1 elements of the same convolution; advances cnt_i
  } op_e;

  // Control register.
  //   Extend mode: b1/b2 are the element widths of src1/src2, n_elem the number of valid
  //     elements per source register, cw the clustering width, ic_dim the elements per
  //     input-cluster, pre_iter the number of cnt_i steps needed to cover a register.
  //   Pack mode: b1 is the input element width, n_elem the number of elements converted per
  //     bs.pack, cw the output element width, ic_dim the number of output elements in the
  //     packed register, post_iter the number of cnt_o steps needed to fill it.
  typedef struct packed {
    logic [FW-1:0] post_iter;
    logic [FW-1:0] pre_iter;
    logic [FW-1:0] ic_dim;
    logic [FW-1:0] cw;
    logic [FW-1:0] n_elem;
    logic [FW-1:0] b2;
    logic [FW-1:0] b1;
  } cfg_t;

  // bs.set operand layout: one field per byte, b1 in byte 0 ... post_iter in byte 6.
  function automatic cfg_t cfg_from_word(input logic [XLEN-1:0] w);
    cfg_t c;
    c.b1        = w[ 6: 0];
    c.b2        = w[14: 8];
    c.n_elem    = w[22:16];
    c.cw        = w[30:24];
    c.ic_dim    = w[38:32];
    c.pre_iter  = w[46:40];
    c.post_iter = w[54:48];
    return c;
  endfunction

  function automatic logic [XLEN-1:0] cfg_to_word(input cfg_t c);
    logic [XLEN-1:0] w;
    w = '0;
    w[ 6: 0] = c.b1;
    w[14: 8] = c.b2;
    w[22:16] = c.n_elem;
    w[30:24] = c.cw;
    w[38:32] = c.ic_dim;
    w[46:40] = c.pre_iter;
    w[54:48] = c.post_iter;
    return w;
  endfunction

  function automatic cfg_t make_cfg(input int b1, input int b2, input int n_elem, input int cw,
                                    input int ic_dim, input int pre_iter, input int post_iter);
    cfg_t c;
    c.b1        = FW'(b1);
    c.b2        = FW'(b2);
    c.n_elem    = FW'(n_elem);
    c.cw        = FW'(cw);
    c.ic_dim    = FW'(ic_dim);
    c.pre_iter  = FW'(pre_iter);
    c.post_iter = FW'(post_iter);
    return c;
  endfunction

  // Extend rows of the published control table, selected by the input bitwidth (1..8).
  //   b : elements/reg, cluster width, elements/cluster, pre-proc iterations
  function automatic cfg_t extend_preset(input int b);
    case (b)
      8:       return make_cfg(8, 8,  8, 21,  3, 3, 1);
      7:       return make_cfg(7, 7,  9, 16,  4, 3, 1);
      6:       return make_cfg(6, 6, 10, 16,  4, 3, 1);
      5:       return make_cfg(5, 5, 12, 16,  4, 3, 1);
      4:       return make_cfg(4, 4, 16, 12,  5, 4, 1);
      3:       return make_cfg(3, 3, 21,  9,  7, 3, 1);
      2:       return make_cfg(2, 2, 32,  8,  8, 4, 1);
      default: return make_cfg(1, 1, 64,  6, 10, 7, 1);
    endcase
  endfunction

  // Pack rows of the published control table: eight 8-bit elements to 1, 2 or 4 bits.
  function automatic cfg_t pack_preset(input int bo);
    case (bo)
      1:       return make_cfg(8, 8, 8, 1, 64, 1, 8);
      2:       return make_cfg(8, 8, 8, 2, 32, 1, 4);
      default: return make_cfg(8, 8, 8, 4, 16, 1, 2);
    endcase
  endfunction

  // Low-order mask of n ones (n = 0..64).
  function automatic logic [XLEN-1:0] ones(input logic [FW:0] n);
    return (n >= (FW+1)'(XLEN)) ? '1 : ((XLEN'(1) << n) - XLEN'(1));
  endfunction

endpackage
