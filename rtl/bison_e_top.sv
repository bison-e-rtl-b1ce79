// bison_e_top: the multiply path of a scalar core's execute stage with BiSon-e attached:
// the BiSon-e unit (bison_e) wired to the core's two-stage 64-bit integer multiplier
// (int_mul64), as in the published block diagram.
//
// The core's register read supplies one BiSon-e instruction per cycle (in_valid, in_op, src1,
// src2); the result leaves towards write-back on ro with out_valid in the instruction's third
// cycle (two clock edges after issue). Instructions are accepted back to back with no stall.
// The core itself (decode, register file, write-back) is not part of this design: its
// signals are the ports of this module.
//
// Instructions (bison_pkg::op_e):
//   bs.set  src1 = configuration word (bison_pkg::cfg_to_word); clears cnt_i and cnt_o
//   bs.pack compress src1 to the configured width, merge into src2 at slice cnt_o
//   bs.ip   inner product of input-cluster cnt_i of src1 and src2
//   bs.lc.l / bs.lc.h  lower / higher half of their linear convolution, in segmented form
//
// Reset is synchronous and active low.
module bison_e_top
  import bison_pkg::*;
#(
  parameter int unsigned MAX_IC   = 10,
  parameter int unsigned MAX_PACK = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  op_e             in_op,
  input  logic [XLEN-1:0] src1,
  input  logic [XLEN-1:0] src2,
  output logic            out_valid,
  output op_e             out_op,
  output logic [XLEN-1:0] ro
);

  logic              mul_valid, m_valid;
  logic [XLEN-1:0]   ic_1, ic_2;
  logic [2*XLEN-1:0] m_out;

  bison_e #(.MAX_IC(MAX_IC), .MAX_PACK(MAX_PACK)) u_bison_e (
    .clk, .rst_n,
    .in_valid, .in_op, .src1, .src2,
    .mul_valid, .ic_1, .ic_2,
    .m_valid, .m_out,
    .out_valid, .out_op, .ro
  );

  int_mul64 u_mul (
    .clk, .rst_n,
    .in_valid (mul_valid),
    .a        (ic_1),
    .b        (ic_2),
    .p_valid  (m_valid),
    .p        (m_out)
  );

endmodule
