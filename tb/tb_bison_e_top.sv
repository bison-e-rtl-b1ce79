// tb_bison_e_top: end-to-end test of the BiSon-e execute slice at its default parameters.
//
// The testbench plays the role of the host core: it issues BiSon-e instructions, collects
// the results in order and runs the kernels the unit is built for, checking every result
// against plain integer arithmetic computed here:
//   1. inner products of long vectors with every extend preset (8- down to 1-bit), using
//      back-to-back bs.ip instructions that step through the clusters of each register;
//   2. a mixed-precision inner product (8-bit by 4-bit);
//   3. a 16 x 12 linear convolution of 4-bit vectors with four-element clusters and 16-bit
//      segments, accumulated by fused overlap-add (bs.lc.l into the current accumulator
//      register, bs.lc.h into the next);
//   4. per-cluster bs.lc.l / bs.lc.h pairs that walk cnt_i through a register;
//   5. compression of 8-bit data to 1, 2 and 4 bits with bs.pack (two registers each, so
//      cnt_o wraps);
//   6. a bs.set issued while two bs.ip are still in flight.
// Every result must leave exactly two clock edges after its instruction was issued. The
// mechanisms exercised are counted and each must occur at least once.
module tb_bison_e_top;
  import bison_pkg::*;

  logic            clk = 1'b0;
  logic            rst_n;
  logic            in_valid;
  op_e             in_op;
  logic [XLEN-1:0] src1, src2;
  logic            out_valid;
  op_e             out_op;
  logic [XLEN-1:0] ro;

  bison_e_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int unsigned cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // mechanism counters
  int n_cnt_i_wrap = 0, n_cnt_o_wrap = 0, n_overlap = 0, n_partial = 0;
  int n_set_in_flight = 0, n_lc_pair = 0, n_pack_merge = 0, n_ip = 0, n_mixed = 0;

  int unsigned     issue_q[$];
  logic [XLEN-1:0] res_q[$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Watchdog.
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Result monitor: order and latency.
  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      int unsigned t;
      if (issue_q.size() == 0) begin
        failures++;
        $display("FAIL: result with no instruction outstanding");
      end else begin
        t = issue_q.pop_front();
        checks++;
        if (cycle - t != 2) begin
          failures++;
          $display("FAIL: latency %0d, expected 2 edges", cycle - t);
        end
      end
      res_q.push_back(ro);
    end
  end

  // Results in consecutive cycles mean that two instructions were in flight at once.
  int unsigned last_res = 0;
  always @(negedge clk)
    if (rst_n && out_valid) begin
      if (last_res != 0 && cycle == last_res + 1) n_overlap++;
      last_res <= cycle;
    end

  task automatic issue(input op_e op, input logic [XLEN-1:0] a, input logic [XLEN-1:0] b);
    @(negedge clk);
    in_valid = 1'b1;
    in_op    = op;
    src1     = a;
    src2     = b;
    if (op != OP_SET) issue_q.push_back(cycle);
  endtask

  task automatic idle();
    @(negedge clk);
    in_valid = 1'b0;
    src1     = $urandom();
    src2     = $urandom();
  endtask

  // Stop issuing and wait until every outstanding result has arrived.
  task automatic drain();
    idle();
    while (issue_q.size() != 0) @(negedge clk);
    @(posedge clk);
  endtask

  task automatic set_cfg(input cfg_t c);
    issue(OP_SET, cfg_to_word(c), '0);
  endtask

  // Pack elements e[start .. start+n-1] of width b into a register, element k at bit k*b.
  function automatic logic [XLEN-1:0] pack_reg(input int unsigned e[], input int b,
                                               input int start, input int n);
    logic [XLEN-1:0] r = '0;
    for (int k = 0; k < n; k++)
      if (start + k < e.size())
        for (int t = 0; t < b; t++)
          if (k * b + t < XLEN) r[k*b+t] = e[start+k][t];
    return r;
  endfunction

  // 1./2. Inner product of two vectors of length len (b1- and b2-bit elements) with cfg c.
  task automatic run_ip(input cfg_t c, input int len, input string name);
    int unsigned u[], v[];
    longint unsigned expect_ip = 0, got = 0;
    int regs;
    u = new[len];
    v = new[len];
    for (int k = 0; k < len; k++) begin
      u[k] = $urandom() & ((1 << c.b1) - 1);
      v[k] = $urandom() & ((1 << c.b2) - 1);
      // force some all-ones elements, the worst case for the guard bits
      if (k % 5 == 0) begin
        u[k] = (1 << c.b1) - 1;
        v[k] = (1 << c.b2) - 1;
      end
      expect_ip += longint'(u[k]) * longint'(v[k]);
    end
    regs = (len + int'(c.n_elem) - 1) / int'(c.n_elem);
    set_cfg(c);
    for (int r = 0; r < regs; r++) begin
      logic [XLEN-1:0] a, b;
      a = pack_reg(u, c.b1, r * c.n_elem, c.n_elem);
      b = pack_reg(v, c.b2, r * c.n_elem, c.n_elem);
      for (int j = 0; j < int'(c.pre_iter); j++) begin
        issue(OP_IP, a, b);
        n_ip++;
        if ((j + 1) * int'(c.ic_dim) > int'(c.n_elem)) n_partial++;
      end
      n_cnt_i_wrap++;
    end
    drain();
    while (res_q.size() != 0) got += res_q.pop_front();
    check(got == expect_ip, $sformatf("%s: IP %0d, expected %0d", name, got, expect_ip));
  endtask

  // 3. Linear convolution with fused overlap-add.
  task automatic run_lc_overlap_add();
    localparam int M = 16, N = 12, IC = 4, CW = 16, B = 4;
    int unsigned u[], v[];
    int unsigned w[M+N-1];
    logic [XLEN-1:0] ureg, vreg;
    logic [XLEN-1:0] ova[(M+N-1+IC-1)/IC];
    int adds = 0;
    cfg_t c;
    u = new[M];
    v = new[N];
    foreach (u[k]) u[k] = $urandom() & 15;
    foreach (v[k]) v[k] = $urandom() & 15;
    u[0] = 15; v[0] = 15; u[M-1] = 15; v[N-1] = 15;
    foreach (w[k]) w[k] = 0;
    for (int i = 0; i < M; i++)
      for (int j = 0; j < N; j++) w[i+j] += u[i] * v[j];
    foreach (ova[k]) ova[k] = '0;
    ureg = pack_reg(u, B, 0, M);
    vreg = pack_reg(v, B, 0, N);
    // four 4-bit elements per cluster, 16-bit segments; one cluster per operand
    c = make_cfg(B, B, IC, CW, IC, 1, 1);
    set_cfg(c);
    for (int i = 0; i < M / IC; i++)
      for (int j = 0; j < N / IC; j++) begin
        issue(OP_LCL, ureg >> (i * IC * B), vreg >> (j * IC * B));
        issue(OP_LCH, ureg >> (i * IC * B), vreg >> (j * IC * B));
        drain();
        check(res_q.size() == 2, "LC: two results per pair");
        ova[i+j]   += res_q.pop_front();
        ova[i+j+1] += res_q.pop_front();
        adds += 2;
        n_lc_pair++;
      end
    check(adds == 24, $sformatf("LC: %0d overlap-add additions, expected 24", adds));
    for (int k = 0; k < M + N - 1; k++) begin
      logic [XLEN-1:0] r = ova[k/IC];
      check(int'(r[(k%IC)*CW +: CW]) == w[k],
            $sformatf("LC: element %0d = %0d, expected %0d", k, r[(k%IC)*CW +: CW], w[k]));
    end
  endtask

  // 4. bs.lc.l / bs.lc.h pairs stepping cnt_i through whole registers (extend presets).
  task automatic run_lc_clusters(input int b);
    cfg_t c = extend_preset(b);
    int unsigned u[], v[];
    int n = c.n_elem, ic = c.ic_dim, cw = c.cw;
    u = new[n];
    v = new[n];
    foreach (u[k]) u[k] = $urandom() & ((1 << b) - 1);
    foreach (v[k]) v[k] = $urandom() & ((1 << b) - 1);
    set_cfg(c);
    for (int j = 0; j < int'(c.pre_iter); j++) begin
      issue(OP_LCL, pack_reg(u, b, 0, n), pack_reg(v, b, 0, n));
      issue(OP_LCH, pack_reg(u, b, 0, n), pack_reg(v, b, 0, n));
      n_lc_pair++;
    end
    n_cnt_i_wrap++;
    drain();
    for (int j = 0; j < int'(c.pre_iter); j++) begin
      logic [XLEN-1:0] lo, hi;
      lo = res_q.pop_front();
      hi = res_q.pop_front();
      for (int k = 0; k < 2 * ic - 1; k++) begin
        int unsigned s = 0, got;
        for (int i = 0; i < ic; i++)
          if (k - i >= 0 && k - i < ic && j*ic + i < n && j*ic + k - i < n)
            s += u[j*ic+i] * v[j*ic+k-i];
        got = (k < ic) ? int'((lo >> (k * cw)) & ((64'd1 << cw) - 1))
                       : int'((hi >> ((k - ic) * cw)) & ((64'd1 << cw) - 1));
        check(got == s, $sformatf("LC %0d-bit cluster %0d element %0d = %0d, expected %0d",
                                  b, j, k, got, s));
      end
    end
  endtask

  // 5. Compress 8-bit data to bo bits, two destination registers.
  task automatic run_pack(input int bo);
    cfg_t c = pack_preset(bo);
    int total = 2 * c.ic_dim;
    int unsigned d[];
    logic [XLEN-1:0] acc;
    d = new[total];
    foreach (d[k]) d[k] = $urandom() & ((1 << bo) - 1);
    set_cfg(c);
    for (int r = 0; r < 2; r++) begin
      acc = {$urandom(), $urandom()};  // stale destination contents must be overwritten
      for (int it = 0; it < int'(c.post_iter); it++) begin
        logic [XLEN-1:0] s = '0;
        for (int k = 0; k < 8; k++)  // 8-bit source elements, with junk in the high bits
          s[k*8 +: 8] = 8'(d[r*c.ic_dim + it*8 + k]) | (8'($urandom()) << bo);
        issue(OP_PACK, s, acc);
        drain();  // the next bs.pack reads this result, as a dependent instruction would
        acc = res_q.pop_front();
        n_pack_merge++;
      end
      n_cnt_o_wrap++;
      check(acc == pack_reg(d, bo, r * c.ic_dim, c.ic_dim),
            $sformatf("pack to %0d bits, register %0d: %h", bo, r, acc));
    end
  endtask

  // 6. Reconfigure while two bs.ip are in flight; their results must use the old layout.
  task automatic run_set_in_flight();
    cfg_t c8 = extend_preset(8), c1 = extend_preset(1);
    logic [XLEN-1:0] a = 64'h0102030405060708, b = 64'h0807060504030201;
    set_cfg(c8);
    issue(OP_IP, a, b);  // cluster 0: elements 0..2 -> 8*1 + 7*2 + 6*3 = 40
    issue(OP_IP, a, b);  // cluster 1: elements 3..5 -> 5*4 + 4*5 + 3*6 = 58
    set_cfg(c1);
    issue(OP_IP, '1, '1);  // ten 1-bit ones: 10
    n_set_in_flight++;
    drain();
    check(res_q.size() == 3, "set in flight: three results");
    check(res_q.pop_front() == 40, "set in flight: first IP");
    check(res_q.pop_front() == 58, "set in flight: second IP");
    check(res_q.pop_front() == 10, "set in flight: IP with new configuration");
  endtask

  // 7. Small worked examples.
  task automatic run_examples();
    logic [XLEN-1:0] lo, hi;
    // IP: 3-bit elements, two per cluster, 7-bit clusters (3 + 3 + 1)
    set_cfg(make_cfg(3, 3, 2, 7, 2, 1, 1));
    issue(OP_IP, 64'(7) | (64'(5) << 3), 64'(4) | (64'(2) << 3));
    drain();
    check(res_q.pop_front() == 38, "example: IP of [7,5] and [4,2]");
    // LC: 2-bit elements, three per cluster (the shorter vector padded with a zero),
    // 5-bit clusters
    set_cfg(make_cfg(2, 2, 3, 5, 3, 1, 1));
    issue(OP_LCL, 64'(3) | (64'(1) << 2) | (64'(2) << 4), 64'(1) | (64'(2) << 2));
    issue(OP_LCH, 64'(3) | (64'(1) << 2) | (64'(2) << 4), 64'(1) | (64'(2) << 2));
    drain();
    lo = res_q.pop_front();
    hi = res_q.pop_front();
    check(lo == (64'(3) | (64'(7) << 5) | (64'(4) << 10)), $sformatf("example: LC low %h", lo));
    check(hi == 64'(4), $sformatf("example: LC high %h", hi));
  endtask

  initial begin
    rst_n    = 1'b0;
    in_valid = 1'b0;
    in_op    = OP_SET;
    src1     = '0;
    src2     = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    for (int b = 8; b >= 1; b--) begin
      automatic cfg_t c = extend_preset(b);
      run_ip(c, 5 * int'(c.n_elem) - 3, $sformatf("%0d-bit", b));
    end
    // mixed precision: 8-bit by 4-bit, 8+4+2 = 14-bit clusters of four
    run_ip(make_cfg(8, 4, 8, 14, 4, 2, 1), 40, "8x4-bit");
    n_mixed++;
    run_lc_overlap_add();
    for (int b = 8; b >= 1; b--) run_lc_clusters(b);
    run_pack(1);
    run_pack(2);
    run_pack(4);
    run_set_in_flight();
    run_examples();

    check(n_ip > 0, "mechanism: bs.ip");
    check(n_cnt_i_wrap > 0, "mechanism: cnt_i wrap");
    check(n_cnt_o_wrap > 0, "mechanism: cnt_o wrap");
    check(n_overlap > 0, "mechanism: back-to-back results (two in flight)");
    check(n_partial > 0, "mechanism: zero-padded partial cluster");
    check(n_lc_pair > 0, "mechanism: bs.lc.l / bs.lc.h pair");
    check(n_pack_merge > 0, "mechanism: bs.pack merge");
    check(n_set_in_flight > 0, "mechanism: bs.set with instructions in flight");
    check(n_mixed > 0, "mechanism: mixed precision");
    $display("mechanisms: ip=%0d cnt_i_wrap=%0d cnt_o_wrap=%0d overlap=%0d partial=%0d lc_pair=%0d pack=%0d set_in_flight=%0d mixed=%0d",
             n_ip, n_cnt_i_wrap, n_cnt_o_wrap, n_overlap, n_partial, n_lc_pair,
             n_pack_merge, n_set_in_flight, n_mixed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
