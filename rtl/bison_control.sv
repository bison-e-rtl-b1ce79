// bison_control: the BiSon-e control register and its two iteration counters.
//
// The control register holds the data layout used by every other BiSon-e instruction
// (element widths, elements per register, clustering width, elements per input-cluster and
// the number of pre- and post-processing iterations). It is written by bs.set from src1
// (layout in bison_pkg::cfg_from_word).
//
// cnt_i selects which input-cluster of src1/src2 the extend unit builds. It counts
// 0 .. pre_iter-1 and wraps, advancing on every bs.ip and on every bs.lc.h. bs.lc.l does not
// advance it, so that a bs.lc.l / bs.lc.h pair works on the same two clusters.
// cnt_o selects where the mask unit merges a bs.pack slice into src2. It counts
// 0 .. post_iter-1 and wraps, advancing on every bs.pack. bs.set clears both counters.
//
// Timing: the outputs are register values. An instruction issued in a cycle sees the state
// left by the instructions before it; its own update takes effect at the next clock edge.
// Reset (active-low, synchronous) loads the 8-bit extend preset and clears both counters.
//
// The register, the counters, their ranges and bs.set follow the published design. Which
// instructions advance cnt_i, the reset value and the synchronous reset are this design's
// choices.
module bison_control
  import bison_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            issue,    // an instruction is issued this cycle
  input  op_e             op,       // its opcode
  input  logic [XLEN-1:0] src1,     // its first source operand (configuration for bs.set)
  output cfg_t            cfg,      // current control register
  output logic [FW-1:0]   cnt_i,    // input-cluster index for the extend unit
  output logic [FW-1:0]   cnt_o     // slice index for the mask unit (bs.pack)
);

  function automatic logic [FW-1:0] step(input logic [FW-1:0] cnt, input logic [FW-1:0] lim);
    return (cnt + FW'(1) >= lim) ? '0 : cnt + FW'(1);
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cfg   <= extend_preset(8);
      cnt_i <= '0;
      cnt_o <= '0;
    end else if (issue) begin
      unique case (op)
        OP_SET: begin
          cfg   <= cfg_from_word(src1);
          cnt_i <= '0;
          cnt_o <= '0;
        end
        OP_IP, OP_LCH: cnt_i <= step(cnt_i, cfg.pre_iter);
        OP_PACK:       cnt_o <= step(cnt_o, cfg.post_iter);
        default: ;
      endcase
    end
  end

  // A configuration must fit one 64-bit register: the clusters and the source elements.
  cfg_t new_cfg;
  assign new_cfg = cfg_from_word(src1);

  a_cfg_fits: assert property (@(posedge clk) disable iff (!rst_n)
    (issue && op == OP_SET) |->
      (32'(new_cfg.ic_dim) * 32'(new_cfg.cw) <= XLEN) &&
      (32'(new_cfg.n_elem) * 32'(new_cfg.b1) <= XLEN) &&
      (new_cfg.pre_iter != '0) && (new_cfg.post_iter != '0));

endmodule
