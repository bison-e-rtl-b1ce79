// tb_bison_pack_unit: checks the bs.pack compressor with the three pack presets (eight
// 8-bit elements to 1, 2 and 4 bits) and with random element counts and widths. Source
// elements carry random bits above the target width, which must be dropped. The reference
// slice is assembled bit by bit here.
module tb_bison_pack_unit;
  import bison_pkg::*;

  logic [XLEN-1:0] src1, slice;
  cfg_t            cfg;

  bison_pack_unit dut (.*);

  int checks = 0, failures = 0;

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [XLEN-1:0] ref_slice(input logic [XLEN-1:0] s, input int bi,
                                                input int bo, input int n);
    logic [XLEN-1:0] r = '0;
    for (int i = 0; i < n; i++)
      for (int t = 0; t < bo; t++) r[i*bo+t] = s[i*bi+t];
    return r;
  endfunction

  task automatic one(input cfg_t c);
    cfg  = c;
    src1 = {$urandom(), $urandom()};
    #1;
    checks++;
    if (slice !== ref_slice(src1, c.b1, c.cw, c.n_elem)) begin
      failures++;
      $display("FAIL pack bi=%0d bo=%0d n=%0d: %h", c.b1, c.cw, c.n_elem, slice);
    end
  endtask

  initial begin
    for (int rep = 0; rep < 200; rep++) begin
      one(pack_preset(1));
      one(pack_preset(2));
      one(pack_preset(4));
    end
    for (int rep = 0; rep < 500; rep++) begin
      automatic int bi = 2 + $urandom_range(0, 6);       // 2..8-bit input
      automatic int bo = 1 + $urandom_range(0, bi - 2);  // narrower output
      int n  = 1 + $urandom_range(0, 7);       // 1..8 elements
      one(make_cfg(bi, bi, n, bo, 64 / bo, 1, 1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
