// tb_string_match: approximate string matching with don't-care symbols on BiSon-e.
//
// For every letter c of the alphabet the text and the pattern become boolean vectors
// (T_c[i] = text[i]==c, P_c[j] = pattern[j]==c, zero at don't-care positions). The number
// of n_match at text position p is sum_c sum_j T_c[p+j] * P_c[j], i.e. element p+m-1 of
// the linear convolution of T_c with the reversed P_c. BiSon-e computes these convolutions
// ten 1-bit elements at a time (6-bit segments, the 1-bit preset layout) with bs.lc.l /
// bs.lc.h, and the host accumulates all letters into one set of overlap-add registers with
// plain 64-bit additions; the segments stay unextracted until the very end. The mismatch
// count per position (non-don't-care pattern symbols minus n_match) is compared with a
// direct character comparison. Runs with a 4-letter and a 256-letter alphabet.
// The pattern is limited to 63 symbols so that a 6-bit segment cannot overflow.
module tb_string_match;
  import bison_pkg::*;

  localparam int IC = 7, CW = 9;

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
  int n_instr = 0;
  int              dst_q[$];  // overlap-add register each outstanding result goes to
  logic [XLEN-1:0] ova[];

  always @(negedge clk)
    if (rst_n && out_valid) begin
      automatic int d = dst_q.pop_front();
      ova[d] += ro;
    end

  initial begin
    repeat (50000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic issue(input op_e op, input logic [XLEN-1:0] a, input logic [XLEN-1:0] b);
    @(negedge clk);
    in_valid = 1'b1;
    in_op    = op;
    src1     = a;
    src2     = b;
    if (op != OP_SET) n_instr++;
  endtask

  task automatic run(input int alpha, input int tlen, input int plen);
    int text[], pat[];
    int nt, np, nout, dc_pos = 0;
    text = new[tlen];
    pat  = new[plen];
    foreach (text[i]) text[i] = $urandom_range(0, alpha - 1);
    // pattern: copied from the text with a few substitutions and don't cares (-1)
    foreach (pat[j]) begin
      pat[j] = text[tlen / 3 + j];
      if ($urandom_range(0, 9) == 0) pat[j] = $urandom_range(0, alpha - 1);
      if ($urandom_range(0, 9) == 0) begin pat[j] = -1; dc_pos++; end
    end
    nt   = (tlen + IC - 1) / IC;
    np   = (plen + IC - 1) / IC;
    nout = nt + np + 1;
    ova  = new[nout];
    foreach (ova[k]) ova[k] = '0;
    n_instr = 0;
    issue(OP_SET, cfg_to_word(make_cfg(1, 1, IC, CW, IC, 1, 1)), '0);
    for (int c = 0; c < alpha; c++) begin
      for (int i = 0; i < nt; i++)
        for (int j = 0; j < np; j++) begin
          logic [XLEN-1:0] a = '0, b = '0;
          for (int k = 0; k < IC; k++) begin
            if (i*IC + k < tlen) a[k] = (text[i*IC+k] == c);
            // reversed pattern: element k of cluster j is pat[plen-1-(j*IC+k)]
            if (j*IC + k < plen) b[k] = (pat[plen-1-(j*IC+k)] == c);
          end
          if (a != 0 && b != 0) begin  // all-zero clusters contribute nothing
            issue(OP_LCL, a, b);
            dst_q.push_back(i + j);
            issue(OP_LCH, a, b);
            dst_q.push_back(i + j + 1);
          end
        end
    end
    @(negedge clk);
    in_valid = 1'b0;
    wait (dst_q.size() == 0);
    @(negedge clk);
    for (int p = 0; p + plen <= tlen; p++) begin
      int k = p + plen - 1, n_match, mism = 0;
      logic [XLEN-1:0] r = ova[k / IC];
      n_match = int'((r >> ((k % IC) * CW)) & 64'h1FF);
      foreach (pat[j]) if (pat[j] >= 0 && pat[j] != text[p+j]) mism++;
      checks++;
      if (plen - dc_pos - n_match != mism) begin
        failures++;
        $display("FAIL alphabet %0d position %0d: %0d mismatches, expected %0d", alpha, p,
                 plen - dc_pos - n_match, mism);
      end
    end
    $display("alphabet %0d, text %0d, pattern %0d: %0d BiSon-e instructions", alpha, tlen,
             plen, n_instr);
  endtask

  initial begin
    rst_n    = 1'b0;
    in_valid = 1'b0;
    in_op    = OP_SET;
    src1     = '0;
    src2     = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run(4, 4096, 256);
    run(256, 4096, 256);
    run(4, 131072, 256);
    run(256, 131072, 256);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
