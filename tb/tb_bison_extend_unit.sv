// tb_bison_extend_unit: checks the input-cluster builder against a bit-by-bit reference.
//
// For every extend preset (8- to 1-bit), the four-element 4-bit / 16-bit-segment layout and
// an 8-bit by 4-bit mixed-precision layout, random registers are clustered at every cnt_i,
// with and without the inner-product reversal. Each cluster is compared with one assembled
// bit by bit here. As an end check of the arithmetic the two reversed clusters are multiplied
// and the inner product is read from the product and compared with a direct sum.
module tb_bison_extend_unit;
  import bison_pkg::*;

  logic [XLEN-1:0] src1, src2, ic_1, ic_2;
  cfg_t            cfg;
  logic [FW-1:0]   cnt_i;
  logic            reverse;

  bison_extend_unit dut (.*);

  int checks = 0, failures = 0;

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [XLEN-1:0] ref_cluster(input logic [XLEN-1:0] s, input int b,
      input int n, input int cw, input int ic, input int cnt, input bit rev);
    logic [XLEN-1:0] r = '0;
    for (int j = 0; j < ic; j++) begin
      int k = cnt * ic + (rev ? ic - 1 - j : j);
      if (k < n)
        for (int t = 0; t < b; t++)
          if (k * b + t < XLEN && j * cw + t < XLEN) r[j*cw+t] = s[k*b+t];
    end
    return r;
  endfunction

  task automatic run(input cfg_t c, input int reps);
    for (int rep = 0; rep < reps; rep++) begin
      src1 = {$urandom(), $urandom()};
      src2 = {$urandom(), $urandom()};
      if (rep == 0) begin
        src1 = '1;
        src2 = '1;
      end
      cfg = c;
      for (int ci = 0; ci < int'(c.pre_iter); ci++)
        for (int rv = 0; rv < 2; rv++) begin
          longint unsigned ip = 0;
          logic [2*XLEN-1:0] prod;
          cnt_i   = FW'(ci);
          reverse = rv[0];
          #1;
          checks++;
          if (ic_1 !== ref_cluster(src1, c.b1, c.n_elem, c.cw, c.ic_dim, ci, 1'b0)) begin
            failures++;
            $display("FAIL ic_1 b=%0d cnt=%0d: %h", c.b1, ci, ic_1);
          end
          checks++;
          if (ic_2 !== ref_cluster(src2, c.b2, c.n_elem, c.cw, c.ic_dim, ci, rv[0])) begin
            failures++;
            $display("FAIL ic_2 b=%0d cnt=%0d rev=%0d: %h", c.b2, ci, rv, ic_2);
          end
          if (rv == 1) begin
            for (int j = 0; j < int'(c.ic_dim); j++) begin
              int k = ci * c.ic_dim + j;
              if (k < int'(c.n_elem))
                ip += longint'((src1 >> (k * c.b1)) & ((64'd1 << c.b1) - 1)) *
                      longint'((src2 >> (k * c.b2)) & ((64'd1 << c.b2) - 1));
            end
            prod = (2*XLEN)'(ic_1) * (2*XLEN)'(ic_2);
            checks++;
            if (((prod >> ((c.ic_dim - 1) * c.cw)) & ((128'd1 << c.cw) - 1)) != 128'(ip)) begin
              failures++;
              $display("FAIL IP via product b=%0d cnt=%0d", c.b1, ci);
            end
          end
        end
    end
  endtask

  initial begin
    for (int b = 1; b <= 8; b++) run(extend_preset(b), 40);
    run(make_cfg(4, 4, 16, 16, 4, 4, 1), 40);
    run(make_cfg(8, 4, 8, 14, 4, 2, 1), 40);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
