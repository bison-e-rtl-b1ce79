// tb_bison_mask_unit: checks the post-processing stage. Random 128-bit products are cut
// for bs.ip, bs.lc.l and bs.lc.h under every extend preset and compared with slices taken
// bit by bit here; random packed slices are merged into random destination registers at
// every cnt_o of the three pack presets, and bs.set must give zero.
module tb_bison_mask_unit;
  import bison_pkg::*;

  op_e               op;
  cfg_t              cfg;
  logic [FW-1:0]     cnt_o;
  logic [2*XLEN-1:0] m_out;
  logic [XLEN-1:0]   pack_slice, pack_dst, ro;

  bison_mask_unit dut (.*);

  int checks = 0, failures = 0;

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [XLEN-1:0] bits(input logic [2*XLEN-1:0] v, input int lo,
                                           input int n);
    logic [XLEN-1:0] r = '0;
    for (int t = 0; t < n; t++) r[t] = v[lo+t];
    return r;
  endfunction

  task automatic expect_ro(input logic [XLEN-1:0] e, input string what);
    #1;
    checks++;
    if (ro !== e) begin
      failures++;
      $display("FAIL %s: %h expected %h", what, ro, e);
    end
  endtask

  initial begin
    for (int rep = 0; rep < 100; rep++)
      for (int b = 1; b <= 8; b++) begin
        automatic cfg_t c = extend_preset(b);
        automatic int n = c.ic_dim, cw = c.cw;
        cfg   = c;
        cnt_o = '0;
        m_out = {$urandom(), $urandom(), $urandom(), $urandom()};
        pack_slice = {$urandom(), $urandom()};
        pack_dst   = {$urandom(), $urandom()};
        op = OP_IP;  expect_ro(bits(m_out, (n - 1) * cw, cw), $sformatf("ip %0d-bit", b));
        op = OP_LCL; expect_ro(bits(m_out, 0, n * cw), $sformatf("lc.l %0d-bit", b));
        op = OP_LCH; expect_ro(bits(m_out, n * cw, (n - 1) * cw), $sformatf("lc.h %0d-bit", b));
        op = OP_SET; expect_ro('0, "set");
      end
    for (int rep = 0; rep < 100; rep++)
      for (int bo = 1; bo <= 4; bo *= 2) begin
        automatic cfg_t c = pack_preset(bo);
        cfg = c;
        op  = OP_PACK;
        for (int k = 0; k < int'(c.post_iter); k++) begin
          logic [XLEN-1:0] e;
          automatic int w = 8 * bo;
          cnt_o      = FW'(k);
          pack_slice = {$urandom(), $urandom()};
          pack_dst   = {$urandom(), $urandom()};
          e = pack_dst;
          for (int t = 0; t < w; t++) e[k*w+t] = pack_slice[t];
          expect_ro(e, $sformatf("pack %0d-bit slice %0d", bo, k));
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
