// tb_qcnn_layers: quantized CNN layers on BiSon-e, with 8-, 4- and 2-bit data and weights.
//
// Both layer types reduce to inner products of compressed vectors (element k at bit k*b of
// consecutive 64-bit words), computed with the extend preset of the data width: one bs.set,
// then for each pair of words pre_iter back-to-back bs.ip instructions whose partial results
// the host adds up.
//   * fully-connected layers: y = W x, with W of 12 x 128 weights and at the size of
//     AlexNet's last layer, 1000 x 4096;
//   * convolutional layer lowered with img2col: four 3x3 filters over a 4-channel 6x6 input
//     (no padding, stride 1), each output pixel the inner product of a 36-element patch,
//     zero-padded to whole words, with a filter.
// Every output is compared with a direct multiply-accumulate.
module tb_qcnn_layers;
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
  logic [XLEN-1:0] res_q[$];

  always @(negedge clk) if (rst_n && out_valid) res_q.push_back(ro);

  initial begin
    repeat (20000000) @(posedge clk);
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
  endtask

  function automatic logic [XLEN-1:0] word(input int unsigned e[], input int b, input int w,
                                           input int n_elem);
    logic [XLEN-1:0] r = '0;
    for (int k = 0; k < n_elem; k++)
      if (w * n_elem + k < e.size()) r = r | (XLEN'(e[w*n_elem+k]) << (k * b));
    return r;
  endfunction

  // Inner product of two equally long vectors on BiSon-e (configuration already set).
  task automatic bs_ip(input cfg_t c, input int unsigned x[], input int unsigned y[],
                       output longint unsigned ip);
    int words = (x.size() + int'(c.n_elem) - 1) / int'(c.n_elem);
    ip = 0;
    for (int w = 0; w < words; w++)
      for (int j = 0; j < int'(c.pre_iter); j++)
        issue(OP_IP, word(x, c.b1, w, c.n_elem), word(y, c.b2, w, c.n_elem));
    @(negedge clk);
    in_valid = 1'b0;
    wait (res_q.size() == words * int'(c.pre_iter));
    while (res_q.size() != 0) ip += res_q.pop_front();
  endtask

  task automatic fc_layer(input int b, input int R, input int C);
    cfg_t c = extend_preset(b);
    int unsigned x[], wrow[];
    x = new[C];
    wrow = new[C];
    foreach (x[k]) x[k] = $urandom() & ((1 << b) - 1);
    issue(OP_SET, cfg_to_word(c), '0);
    for (int r = 0; r < R; r++) begin
      longint unsigned got, e = 0;
      foreach (wrow[k]) begin
        wrow[k] = $urandom() & ((1 << b) - 1);
        e += longint'(wrow[k]) * longint'(x[k]);
      end
      bs_ip(c, wrow, x, got);
      checks++;
      if (got != e) begin
        failures++;
        $display("FAIL FC %0d-bit row %0d: %0d expected %0d", b, r, got, e);
      end
    end
  endtask

  task automatic conv_layer(input int b);
    localparam int CH = 4, H = 6, K = 3, F = 4, OH = H - K + 1, P = CH * K * K;
    cfg_t c = extend_preset(b);
    int unsigned img[CH][H][H];
    int unsigned flt[F][], patch[];
    int padded = ((P + int'(c.n_elem) - 1) / int'(c.n_elem)) * int'(c.n_elem);
    foreach (img[ch, y, x]) img[ch][y][x] = $urandom() & ((1 << b) - 1);
    for (int f = 0; f < F; f++) begin
      flt[f] = new[padded];
      foreach (flt[f][k]) flt[f][k] = (k < P) ? ($urandom() & ((1 << b) - 1)) : 0;
    end
    patch = new[padded];
    issue(OP_SET, cfg_to_word(c), '0);
    for (int oy = 0; oy < OH; oy++)
      for (int ox = 0; ox < OH; ox++) begin
        foreach (patch[k]) patch[k] = 0;
        for (int ch = 0; ch < CH; ch++)
          for (int ky = 0; ky < K; ky++)
            for (int kx = 0; kx < K; kx++)
              patch[(ch * K + ky) * K + kx] = img[ch][oy+ky][ox+kx];
        for (int f = 0; f < F; f++) begin
          longint unsigned got, e = 0;
          for (int ch = 0; ch < CH; ch++)
            for (int ky = 0; ky < K; ky++)
              for (int kx = 0; kx < K; kx++)
                e += longint'(img[ch][oy+ky][ox+kx]) * longint'(flt[f][(ch * K + ky) * K + kx]);
          bs_ip(c, patch, flt[f], got);
          checks++;
          if (got != e) begin
            failures++;
            $display("FAIL conv %0d-bit (%0d,%0d) filter %0d: %0d expected %0d", b, oy, ox,
                     f, got, e);
          end
        end
      end
  endtask

  initial begin
    rst_n    = 1'b0;
    in_valid = 1'b0;
    in_op    = OP_SET;
    src1     = '0;
    src2     = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    fc_layer(8, 12, 128);
    fc_layer(4, 12, 128);
    fc_layer(2, 12, 128);
    // the last fully-connected layer of AlexNet: 4096 inputs, 1000 outputs
    fc_layer(8, 1000, 4096);
    fc_layer(4, 1000, 4096);
    fc_layer(2, 1000, 4096);
    conv_layer(8);
    conv_layer(4);
    conv_layer(2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
