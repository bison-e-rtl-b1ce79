// tb_int_mul64: checks the two-stage multiplier. Random operand pairs (with all-ones and
// zero corner cases) are presented with random gaps, including back-to-back; each product
// must appear, with p_valid, exactly two clock edges later and equal the 128-bit product
// worked out here, and p_valid must be low when nothing was presented.
module tb_int_mul64;
  import bison_pkg::*;

  logic              clk = 1'b0;
  logic              rst_n;
  logic              in_valid;
  logic [XLEN-1:0]   a, b;
  logic              p_valid;
  logic [2*XLEN-1:0] p;

  int_mul64 dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [2*XLEN-1:0] exp_q[$];
  bit                vld_q[$];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n    = 1'b0;
    in_valid = 1'b0;
    a        = '0;
    b        = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      // what was presented two edges ago must be out now
      if (vld_q.size() == 2) begin
        automatic bit v = vld_q.pop_front();
        automatic logic [2*XLEN-1:0] e = exp_q.pop_front();
        checks++;
        if (p_valid !== v || (v && p !== e)) begin
          failures++;
          $display("FAIL at %0d: p_valid=%0d p=%h expected %0d %h", n, p_valid, p, v, e);
        end
      end
      in_valid = ($urandom_range(0, 3) != 0);
      a = {$urandom(), $urandom()};
      b = {$urandom(), $urandom()};
      if (n % 50 == 1) a = '1;
      if (n % 50 == 2) b = '1;
      if (n % 50 == 3) begin a = '1; b = '1; end
      if (n % 50 == 4) a = '0;
      vld_q.push_back(in_valid);
      exp_q.push_back((2*XLEN)'(a) * (2*XLEN)'(b));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
