// bison_mask_unit: the BiSon-e post-processing stage, which forms the value written back.
//
// For the multiplying instructions it cuts a slice out of the 128-bit product m_out of the
// two input-clusters (n = ic_dim, cw = clustering width):
//   bs.ip   : bits (n-1)*cw .. n*cw-1      the inner product of the two clusters
//   bs.lc.l : bits 0 .. n*cw-1             convolution elements 0 .. n-1, still segmented
//   bs.lc.h : bits n*cw .. (2n-1)*cw-1     convolution elements n .. 2n-2, shifted down
// The convolution slices keep their cw-bit segmented format, so software can accumulate
// them into overlap-add registers with ordinary 64-bit additions (bs.lc.l into the current
// register, bs.lc.h into the next one).
// For bs.pack it merges the n_elem*cw-bit slice from the pack unit into the destination
// register pack_dst at bit cnt_o*n_elem*cw, leaving the other bits of pack_dst unchanged.
// bs.set produces zero.
//
// Purely combinational. cfg and cnt_o must be the values seen when the instruction was
// issued; bison_e carries them down its pipeline for that. The slice positions follow the
// published design; replacing (rather than OR-ing) the packed field is this design's choice.
module bison_mask_unit
  import bison_pkg::*;
(
  input  op_e               op,
  input  cfg_t              cfg,
  input  logic [FW-1:0]     cnt_o,
  input  logic [2*XLEN-1:0] m_out,      // multiplier product
  input  logic [XLEN-1:0]   pack_slice, // from the pack unit
  input  logic [XLEN-1:0]   pack_dst,   // src2 of bs.pack: the register being filled
  output logic [XLEN-1:0]   ro
);

  logic [FW:0]       ncw;   // n*cw, at most 64 for a valid configuration
  logic [FW:0]       pw;    // bs.pack slice width n_elem*cw
  logic [15:0]       poff;  // bs.pack slice offset
  logic [2*XLEN-1:0] sh;

  always_comb begin
    ncw  = (FW+1)'(16'(cfg.ic_dim) * 16'(cfg.cw));
    pw   = (FW+1)'(16'(cfg.n_elem) * 16'(cfg.cw));
    poff = 16'(cnt_o) * 16'(pw);
    ro   = '0;
    sh   = '0;
    unique case (op)
      OP_IP: begin
        sh = m_out >> (ncw - (FW+1)'(cfg.cw));
        ro = sh[XLEN-1:0] & ones({1'b0, cfg.cw});
      end
      OP_LCL: ro = m_out[XLEN-1:0] & ones(ncw);
      OP_LCH: begin
        sh = m_out >> ncw;
        ro = sh[XLEN-1:0] & ones(ncw - (FW+1)'(cfg.cw));
      end
      OP_PACK: ro = (pack_dst & ~(ones(pw) << poff)) | ((pack_slice & ones(pw)) << poff);
      default: ro = '0;
    endcase
  end

endmodule
