// int_mul64: the processor's two-stage unsigned 64 x 64 -> 128-bit integer multiplier,
// which BiSon-e borrows for its inner-product and convolution instructions.
//
// Stage 1 registers the operands (the multiplier input registers), stage 2 multiplies and
// registers the full 128-bit product (the multiplier output register). An operand pair
// presented with in_valid in one cycle is in p / p_valid two clock edges later. A new pair
// can be accepted every cycle, so two multiplications are in flight at once.
//
// The multiplier, its two stages and its input and output registers follow the published
// design. Its insides are not published; this is a behavioural '*' left to synthesis.
// Unsigned operands, the full-width product and the synchronous active-low reset of the
// valid bits are this design's choices.
module int_mul64
  import bison_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [XLEN-1:0]   a,
  input  logic [XLEN-1:0]   b,
  output logic              p_valid,
  output logic [2*XLEN-1:0] p
);

  logic            s1_valid;
  logic [XLEN-1:0] a_q, b_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      p_valid  <= 1'b0;
    end else begin
      s1_valid <= in_valid;
      p_valid  <= s1_valid;
    end
  end

  // Data registers load only with valid data, and need no reset.
  always_ff @(posedge clk) begin
    if (in_valid) begin
      a_q <= a;
      b_q <= b;
    end
    if (s1_valid) p <= (2*XLEN)'(a_q) * (2*XLEN)'(b_q);
  end

endmodule
