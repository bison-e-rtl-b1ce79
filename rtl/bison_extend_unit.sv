// bison_extend_unit: builds the two input-clusters that BiSon-e sends to the multiplier.
//
// src1 and src2 hold narrow unsigned elements stored back to back (element k of src1 at bit
// k*b1, of src2 at bit k*b2), up to n_elem of them. For the cluster index cnt_i the unit takes
// elements cnt_i*ic_dim .. cnt_i*ic_dim+ic_dim-1 and widens each to the clustering width cw:
//   ic_1 = sum_j src1_elem[cnt_i*ic_dim + j] * 2^(j*cw)
//   ic_2 = sum_j src2_elem[cnt_i*ic_dim + j] * 2^(j*cw)                       (convolution)
//   ic_2 = sum_j src2_elem[cnt_i*ic_dim + ic_dim-1-j] * 2^(j*cw)   (inner product, reversed)
// Element indices at or past n_elem read as zero, so the last, partly filled cluster of a
// register (for example the third cluster of eight 8-bit elements taken three at a time) is
// padded with zeros. With the reversal, the product of the two clusters carries the inner
// product at bit (ic_dim-1)*cw; without it, the product is the linear convolution, element k
// at bit k*cw.
//
// Purely combinational. Up to MAX_IC elements per cluster; a configuration whose clusters
// overflow 64 bits loses the bits above bit 63 (bison_control asserts against it).
// The cluster arithmetic follows the published binary-segmentation equations and the
// extend configurations; the zero padding of a partial cluster, the generic shift-based
// structure (any width, any cluster size) and MAX_IC's use as a hardware bound are this
// design's own choices.
module bison_extend_unit
  import bison_pkg::*;
#(
  parameter int unsigned MAX_IC = 10  // largest input-cluster (ten 1-bit elements)
) (
  input  logic [XLEN-1:0] src1,
  input  logic [XLEN-1:0] src2,
  input  cfg_t            cfg,
  input  logic [FW-1:0]   cnt_i,
  input  logic            reverse,  // 1 for bs.ip: reverse the src2 cluster
  output logic [XLEN-1:0] ic_1,
  output logic [XLEN-1:0] ic_2
);

  always_comb begin
    logic [15:0] base, idx1, idx2;
    logic [XLEN-1:0] e1, e2;
    ic_1 = '0;
    ic_2 = '0;
    base = 16'(cnt_i) * 16'(cfg.ic_dim);
    for (int unsigned j = 0; j < MAX_IC; j++) begin
      idx1 = base + 16'(j);
      idx2 = reverse ? base + 16'(cfg.ic_dim) - 16'(1) - 16'(j) : idx1;
      e1 = (src1 >> (32'(idx1) * 32'(cfg.b1))) & ones({1'b0, cfg.b1});
      e2 = (src2 >> (32'(idx2) * 32'(cfg.b2))) & ones({1'b0, cfg.b2});
      if (FW'(j) < cfg.ic_dim) begin
        if (idx1 < 16'(cfg.n_elem)) ic_1 = ic_1 | (e1 << (32'(j) * 32'(cfg.cw)));
        if (idx2 < 16'(cfg.n_elem)) ic_2 = ic_2 | (e2 << (32'(j) * 32'(cfg.cw)));
      end
    end
  end

endmodule
