// bison_e: the BiSon-e binary-segmentation unit that sits around the processor multiplier.
//
// BiSon-e lets a scalar core run SIMD-style narrow-integer inner products and convolutions
// on its ordinary 64-bit multiplier. Data stay compressed in registers (element k of an
// operand at bit k*b). For each instruction:
//   * pre-processing: the extend unit widens ic_dim elements of src1 and src2 (chosen by
//     cnt_i) to the clustering width and sends the two input-clusters ic_1 / ic_2 to the
//     multiplier; for bs.pack the pack unit narrows the elements of src1 instead;
//   * the external two-stage multiplier forms the 128-bit product m_out;
//   * post-processing: the mask unit cuts the inner product or a convolution half out of
//     m_out, or merges the packed slice into src2, and drives the result ro.
// The control block holds the control register (written by bs.set) and the counters cnt_i
// and cnt_o.
//
// Interface and timing: one instruction may be issued per cycle (in_valid, in_op, src1,
// src2), there is no stall. Its result appears on ro with out_valid two clock edges later,
// i.e. in its third cycle: cycle 1 pre-processing into the multiplier input registers,
// cycle 2 multiplication into the multiplier output register, cycle 3 post-processing and
// write-back. Consecutive instructions overlap, so up to two of them are held in the
// multiplier registers at once. bs.set produces no result (out_valid stays low for it).
// bs.pack does not use the multiplier; its slice, src2, the configuration and cnt_o travel
// alongside in sideband registers of the same depth so that all results keep their order.
//
// The split into control, extend, pack and mask units, the instructions, the three-cycle
// latency and the pipelining through the multiplier registers follow the published design.
// The sideband registers, which let a bs.set overtake instructions still in flight without
// changing their results, are this design's choice.
module bison_e
  import bison_pkg::*;
#(
  parameter int unsigned MAX_IC   = 10,  // largest input-cluster, elements
  parameter int unsigned MAX_PACK = 8    // elements converted by one bs.pack
) (
  input  logic              clk,
  input  logic              rst_n,
  // from register read
  input  logic              in_valid,
  input  op_e               in_op,
  input  logic [XLEN-1:0]   src1,
  input  logic [XLEN-1:0]   src2,
  // to and from the processor multiplier
  output logic              mul_valid,
  output logic [XLEN-1:0]   ic_1,
  output logic [XLEN-1:0]   ic_2,
  input  logic              m_valid,
  input  logic [2*XLEN-1:0] m_out,
  // to write-back
  output logic              out_valid,
  output op_e               out_op,
  output logic [XLEN-1:0]   ro
);

  typedef struct packed {
    logic            valid;
    op_e             op;
    cfg_t            cfg;
    logic [FW-1:0]   cnt_o;
    logic [XLEN-1:0] slice;
    logic [XLEN-1:0] dst;
  } side_t;

  cfg_t            cfg;
  logic [FW-1:0]   cnt_i, cnt_o;
  logic [XLEN-1:0] slice;
  side_t           s1, s2;

  bison_control u_control (
    .clk, .rst_n,
    .issue (in_valid),
    .op    (in_op),
    .src1,
    .cfg, .cnt_i, .cnt_o
  );

  bison_extend_unit #(.MAX_IC(MAX_IC)) u_extend (
    .src1, .src2, .cfg, .cnt_i,
    .reverse (in_op == OP_IP),
    .ic_1, .ic_2
  );

  bison_pack_unit #(.MAX_PACK(MAX_PACK)) u_pack (
    .src1, .cfg, .slice
  );

  assign mul_valid = in_valid && (in_op inside {OP_IP, OP_LCL, OP_LCH});

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s1.valid <= 1'b0;
      s2.valid <= 1'b0;
    end else begin
      s1.valid <= in_valid;
      s2.valid <= s1.valid;
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      s1.op    <= in_op;
      s1.cfg   <= cfg;
      s1.cnt_o <= cnt_o;
      s1.slice <= slice;
      s1.dst   <= src2;
    end
    if (s1.valid) begin
      s2.op    <= s1.op;
      s2.cfg   <= s1.cfg;
      s2.cnt_o <= s1.cnt_o;
      s2.slice <= s1.slice;
      s2.dst   <= s1.dst;
    end
  end

  bison_mask_unit u_mask (
    .op         (s2.op),
    .cfg        (s2.cfg),
    .cnt_o      (s2.cnt_o),
    .m_out,
    .pack_slice (s2.slice),
    .pack_dst   (s2.dst),
    .ro
  );

  assign out_valid = s2.valid && (s2.op != OP_SET);
  assign out_op    = s2.op;

  // A multiplying instruction reaching post-processing must find its product ready.
  a_product_ready: assert property (@(posedge clk) disable iff (!rst_n)
    (s2.valid && (s2.op inside {OP_IP, OP_LCL, OP_LCH})) |-> m_valid);

endmodule
