// tb_bison_control: checks the control register and the cnt_i / cnt_o counters.
//
// After reset the register must hold the 8-bit extend preset and both counters zero.
// bs.set must load every field from the operand and clear the counters. A random stream
// of instructions is then issued (with idle cycles) and the counters are compared each
// cycle with a model kept here: cnt_i advances on bs.ip and bs.lc.h and wraps at pre_iter,
// cnt_o advances on bs.pack and wraps at post_iter, bs.lc.l changes neither.
module tb_bison_control;
  import bison_pkg::*;

  logic            clk = 1'b0;
  logic            rst_n;
  logic            issue;
  op_e             op;
  logic [XLEN-1:0] src1;
  cfg_t            cfg;
  logic [FW-1:0]   cnt_i, cnt_o;

  bison_control dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int m_i = 0, m_o = 0, wraps_i = 0, wraps_o = 0;
  cfg_t m_cfg;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    rst_n = 1'b0;
    issue = 1'b0;
    op    = OP_IP;
    src1  = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check(cfg == extend_preset(8), "reset configuration");
    check(cnt_i == 0 && cnt_o == 0, "reset counters");
    m_cfg = extend_preset(8);
    for (int n = 0; n < 4000; n++) begin
      automatic int r = $urandom_range(0, 99);
      @(negedge clk);
      issue = (r < 85);
      if (r < 5) begin
        automatic int b = $urandom_range(1, 8);
        op    = OP_SET;
        m_cfg = (r < 3) ? extend_preset(b) : pack_preset(1 << $urandom_range(0, 2));
        src1  = cfg_to_word(m_cfg) | ({$urandom(), $urandom()} & 64'hFF80_8080_8080_8080);
      end else begin
        op   = op_e'($urandom_range(1, 4));
        src1 = {$urandom(), $urandom()};
      end
      @(posedge clk);
      if (issue) begin
        case (op)
          OP_SET: begin m_i = 0; m_o = 0; end
          OP_IP, OP_LCH: begin
            m_i = m_i + 1;
            if (m_i >= int'(m_cfg.pre_iter)) begin m_i = 0; wraps_i++; end
          end
          OP_PACK: begin
            m_o = m_o + 1;
            if (m_o >= int'(m_cfg.post_iter)) begin m_o = 0; wraps_o++; end
          end
          default: ;
        endcase
      end
      #1;
      check(cfg == m_cfg, "configuration");
      check(int'(cnt_i) == m_i, $sformatf("cnt_i %0d expected %0d", cnt_i, m_i));
      check(int'(cnt_o) == m_o, $sformatf("cnt_o %0d expected %0d", cnt_o, m_o));
    end
    check(wraps_i > 0 && wraps_o > 0, "both counters wrapped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
