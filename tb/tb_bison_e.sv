// tb_bison_e: checks the BiSon-e unit on its own, with the multiplier modelled here as two
// register stages around a plain '*'.
//
// Instructions are issued back to back in random order (bs.ip, bs.lc.l, bs.lc.h, bs.pack,
// and bs.set with every extend and pack preset). A model kept here tracks the configuration
// and the counters, builds the clusters element by element, and predicts each result; the
// unit's results must match in order, arrive two edges after issue, and mul_valid must be
// raised exactly for the multiplying instructions.
module tb_bison_e;
  import bison_pkg::*;

  logic              clk = 1'b0;
  logic              rst_n;
  logic              in_valid;
  op_e               in_op;
  logic [XLEN-1:0]   src1, src2;
  logic              mul_valid;
  logic [XLEN-1:0]   ic_1, ic_2;
  logic              m_valid;
  logic [2*XLEN-1:0] m_out;
  logic              out_valid;
  op_e               out_op;
  logic [XLEN-1:0]   ro;

  bison_e dut (.*);

  always #5 clk = ~clk;

  // multiplier model
  logic              mv1;
  logic [XLEN-1:0]   ma, mb;
  always @(posedge clk) begin
    mv1     <= rst_n && mul_valid;
    m_valid <= rst_n && mv1;
    ma      <= ic_1;
    mb      <= ic_2;
    m_out   <= (2*XLEN)'(ma) * (2*XLEN)'(mb);
  end

  int checks = 0, failures = 0;
  int unsigned cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  typedef struct { int unsigned t; op_e op; logic [XLEN-1:0] val; } exp_t;
  exp_t exp_q[$];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL: unexpected result");
      end else begin
        automatic exp_t e = exp_q.pop_front();
        if (ro !== e.val || out_op != e.op || cycle - e.t != 2) begin
          failures++;
          $display("FAIL %s: ro=%h expected %h, latency %0d", e.op.name(), ro, e.val,
                   cycle - e.t);
        end
      end
    end
  end

  // model state
  cfg_t mc;
  int   mi, mo;

  function automatic longint unsigned elem(input logic [XLEN-1:0] r, input int k, input int b,
                                           input int n);
    if (k >= n || k * b >= XLEN) return 0;
    return longint'((r >> (k * b)) & ((64'd1 << b) - 1));
  endfunction

  function automatic logic [XLEN-1:0] predict(input op_e op, input logic [XLEN-1:0] a,
                                              input logic [XLEN-1:0] b);
    int n = mc.ic_dim;
    logic [XLEN-1:0] r = '0;
    case (op)
      OP_IP: begin
        longint unsigned s = 0;
        for (int j = 0; j < n; j++)
          s += elem(a, mi*n + j, mc.b1, mc.n_elem) * elem(b, mi*n + j, mc.b2, mc.n_elem);
        r = s;
      end
      OP_LCL, OP_LCH: begin
        for (int k = 0; k < 2 * n - 1; k++) begin
          longint unsigned s = 0;
          for (int i = 0; i < n; i++)
            if (k - i >= 0 && k - i < n)
              s += elem(a, mi*n + i, mc.b1, mc.n_elem) * elem(b, mi*n + k - i, mc.b2, mc.n_elem);
          if (op == OP_LCL && k < n) r = r | (s << (k * mc.cw));
          if (op == OP_LCH && k >= n) r = r | (s << ((k - n) * mc.cw));
        end
      end
      OP_PACK: begin
        int w = mc.n_elem * mc.cw;
        r = b;
        for (int i = 0; i < int'(mc.n_elem); i++)
          for (int t = 0; t < int'(mc.cw); t++)
            r[mo*w + i*mc.cw + t] = a[i*mc.b1 + t];
      end
      default: r = '0;
    endcase
    return r;
  endfunction

  int n_mul = 0, n_mulv = 0;
  always @(negedge clk)
    if (rst_n && in_valid) begin
      n_mul++;
      checks++;
      if (mul_valid !== (in_op inside {OP_IP, OP_LCL, OP_LCH})) begin
        failures++;
        $display("FAIL: mul_valid for %s", in_op.name());
      end
    end

  initial begin
    rst_n    = 1'b0;
    in_valid = 1'b0;
    in_op    = OP_SET;
    src1     = '0;
    src2     = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    mc = extend_preset(8);
    mi = 0;
    mo = 0;
    for (int n = 0; n < 3000; n++) begin
      automatic int r = $urandom_range(0, 99);
      @(negedge clk);
      in_valid = (r < 90);
      src1 = {$urandom(), $urandom()};
      src2 = {$urandom(), $urandom()};
      if (r < 6) begin
        automatic cfg_t c = (r < 4) ? extend_preset($urandom_range(1, 8))
                          : pack_preset(1 << $urandom_range(0, 2));
        in_op = OP_SET;
        src1  = cfg_to_word(c);
      end else begin
        // pack only under a pack configuration, the others under an extend one
        if (mc.post_iter > 1) in_op = OP_PACK;
        else                  in_op = op_e'($urandom_range(2, 4));
      end
      if (in_valid) begin
        if (in_op != OP_SET)
          exp_q.push_back('{t: cycle, op: in_op, val: predict(in_op, src1, src2)});
        case (in_op)
          OP_SET: begin mc = cfg_from_word(src1); mi = 0; mo = 0; end
          OP_IP, OP_LCH: mi = (mi + 1 >= int'(mc.pre_iter)) ? 0 : mi + 1;
          OP_PACK: mo = (mo + 1 >= int'(mc.post_iter)) ? 0 : mo + 1;
          default: ;
        endcase
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (4) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL: %0d results missing", exp_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
