// tb_xnor_accelerator: end-to-end test of the binary CNN accelerator at its
// default size (32x32x3 input, conv 5x5x6 and 5x5x16 with 2x2 pooling,
// dense 400-120-84-43). All weights, biases and BN parameters are random and
// written over the configuration bus, then two random frames are classified.
// All 43 class scores of each frame are compared with the reference model,
// done must pulse with the last score, and the number of cycles per frame
// is reported and bounded. Both activation values must occur in every layer
// (checked on the reference results).
module tb_xnor_accelerator;
  import xnor_pkg::*;
  import xnor_ref_pkg::*;
  localparam int P1 = 14, P2 = 5, N1 = K1 * K1 * C0, N2 = K2 * K2 * F1;
  localparam int NIN1 = P2 * P2 * F2;
  logic clk = 0, rst_n = 0;
  cfg_t cfg = '0;
  logic in_we = 0, start = 0, ready, in_ready, busy, score_valid, done;
  logic [9:0] in_addr = '0;
  logic [C0-1:0] in_data = '0;
  logic [5:0] score_idx;
  logic signed [VAL_W-1:0] score;
  int checks = 0, failures = 0, n_overlap = 0, n_wait = 0;
  longint cyc = 0;
  localparam int NFR = 3;
  bit imgs [NFR][];
  int exp_score [NFR][];
  longint t_start [NFR];

  xnor_accelerator dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cfg_write(input int target, input int row, input int col, input logic [31:0] data);
    @(negedge clk);
    cfg.en = 1; cfg.target = 4'(target); cfg.row = 16'(row); cfg.col = 16'(col); cfg.data = data;
    @(negedge clk);
    cfg.en = 0;
  endtask

  bit w1[], w2[], wd1[], wd2[], wd3[];
  int b1[], m1[], a1[], b2[], m2[], a2[], bd1[], md1[], ad1[], bd2[], md2[], ad2[], bd3[], md3[], ad3[];

  task automatic rand_bn(input int n, ref int b[], ref int m[], ref int a[], input int spread);
    b = new[n]; m = new[n]; a = new[n];
    for (int i = 0; i < n; i++) begin
      b[i] = $urandom_range(0, 4) - 2;
      m[i] = $urandom_range(1, 3) * (($urandom_range(0, 4) == 0) ? -1 : 1);
      a[i] = $urandom_range(0, 2 * spread) - spread;
    end
  endtask

  task automatic load_conv(input int base, input int f, input int n, ref bit w[], ref int b[], ref int m[], ref int a[]);
    for (int fi = 0; fi < f; fi++) begin
      logic [159:0] v;
      v = '0;
      for (int i = 0; i < n; i++) v[i] = w[fi * n + i];
      for (int wd = 0; wd < (n + 31) / 32; wd++) cfg_write(base + T_W, fi, wd, v[wd*32 +: 32]);
      cfg_write(base + T_B, fi, 0, 32'(b[fi]));
      cfg_write(base + T_BN, fi, 0, {16'(m[fi]), 16'(a[fi])});
    end
  endtask

  task automatic load_dense(input int base, input int ni, input int iw, input int no, ref bit w[], ref int b[], ref int m[], ref int a[]);
    for (int o = 0; o < no; o++) begin
      cfg_write(base + T_B, o, 0, 32'(b[o]));
      cfg_write(base + T_BN, o, 0, {16'(m[o]), 16'(a[o])});
      for (int ch = 0; ch < ni / iw; ch++) begin
        logic [31:0] d;
        d = '0;
        for (int j = 0; j < iw; j++) d[j] = w[o * ni + ch * iw + j];
        cfg_write(base + T_W, ch, o, d);
      end
    end
  endtask

  // Writes one image in raster order, waiting whenever in_ready is low.
  task automatic write_image(input int fr);
    for (int p = 0; p < IMG * IMG; p++) begin
      in_we = 1; in_addr = 10'(p);
      for (int c = 0; c < C0; c++) in_data[c] = imgs[fr][p * C0 + c];
      #1;
      while (!in_ready) begin in_we = 0; n_wait++; @(negedge clk); in_we = 1; #1; end
      @(negedge clk);
    end
    in_we = 0;
  endtask

  function automatic void count_signs(ref bit v[], input string layer, inout int fails);
    int p;
    p = 0;
    foreach (v[i]) p += v[i];
    $display("layer %s: %0d of %0d activations are +1", layer, p, v.size());
    if (p == 0 || p == v.size()) fails++;
  endfunction

  initial begin
    bit f1[], f2[], h1[], h2[], h3[];
    int v1[], v2[];
    w1 = new[F1 * N1]; w2 = new[F2 * N2]; wd1 = new[FC1_OUT * NIN1]; wd2 = new[FC2_OUT * FC1_OUT]; wd3 = new[N_CLASS * FC2_OUT];
    foreach (w1[i]) w1[i] = 1'($urandom);
    foreach (w2[i]) w2[i] = 1'($urandom);
    foreach (wd1[i]) wd1[i] = 1'($urandom);
    foreach (wd2[i]) wd2[i] = 1'($urandom);
    foreach (wd3[i]) wd3[i] = 1'($urandom);
    rand_bn(F1, b1, m1, a1, 12);
    rand_bn(F2, b2, m2, a2, 16);
    rand_bn(FC1_OUT, bd1, md1, ad1, 20);
    rand_bn(FC2_OUT, bd2, md2, ad2, 10);
    rand_bn(N_CLASS, bd3, md3, ad3, 10);
    load_conv(0, F1, N1, w1, b1, m1, a1);
    load_conv(3, F2, N2, w2, b2, m2, a2);
    load_dense(6, NIN1, F2, FC1_OUT, wd1, bd1, md1, ad1);
    load_dense(9, FC1_OUT, 1, FC2_OUT, wd2, bd2, md2, ad2);
    load_dense(12, FC2_OUT, 1, N_CLASS, wd3, bd3, md3, ad3);
    rst_n = 1;
    // Reference results of all frames first.
    for (int fr = 0; fr < NFR; fr++) begin
      int sign_fails;
      imgs[fr] = new[IMG * IMG * C0];
      foreach (imgs[fr][i]) imgs[fr][i] = 1'($urandom);
      conv_layer(imgs[fr], IMG, IMG, C0, K1, F1, w1, b1, m1, a1, f1);
      conv_layer(f1, P1, P1, F1, K2, F2, w2, b2, m2, a2, f2);
      dense_layer(f2, NIN1, FC1_OUT, wd1, bd1, md1, ad1, v1, h1);
      dense_layer(h1, FC1_OUT, FC2_OUT, wd2, bd2, md2, ad2, v2, h2);
      dense_layer(h2, FC2_OUT, N_CLASS, wd3, bd3, md3, ad3, exp_score[fr], h3);
      sign_fails = 0;
      count_signs(f1, "conv1", sign_fails);
      count_signs(f2, "conv2", sign_fails);
      count_signs(h1, "dense1", sign_fails);
      count_signs(h2, "dense2", sign_fails);
      checks++;
      if (sign_fails != 0) begin failures++; $display("FAIL: a layer produced only one activation value"); end
    end
    fork
      // Producer: the first image is written before the first start; each
      // further image is written right behind layer 1's reader, and each
      // frame starts as soon as layer 1 is free.
      begin
        for (int fr = 0; fr < NFR; fr++) begin
          if (fr == 0) write_image(0);
          while (!ready) @(negedge clk);
          if (busy) n_overlap++;
          start = 1; t_start[fr] = cyc;
          @(negedge clk);
          start = 0;
          if (fr + 1 < NFR) write_image(fr + 1);
        end
      end
      // Consumer: scores of each frame, in order.
      for (int fr = 0; fr < NFR; fr++) begin
        int k;
        k = 0;
        while (k < N_CLASS) begin
          @(negedge clk);
          if (score_valid) begin
            checks++;
            if (int'(score_idx) != k || int'(score) != exp_score[fr][k]) begin
              failures++; $display("FAIL frame %0d: class %0d score %0d expected class %0d score %0d", fr, score_idx, score, k, exp_score[fr][k]);
            end
            k++;
          end
        end
        @(negedge clk);
        checks++;
        if (!done) begin failures++; $display("FAIL: done did not follow the last score"); end
        $display("frame %0d: %0d cycles from start to done", fr, cyc - t_start[fr]);
        checks++;
        if (cyc - t_start[fr] != 1518) begin failures++; $display("FAIL: frame latency changed"); end
      end
    join
    for (int fr = 1; fr < NFR; fr++) $display("start interval %0d cycles", t_start[fr] - t_start[fr-1]);
    $display("starts during a busy frame: %0d, input writes held back: %0d", n_overlap, n_wait);
    checks++;
    if (n_overlap == 0) begin failures++; $display("FAIL: frames never overlapped"); end
    @(negedge clk);
    checks++;
    if (busy) begin failures++; $display("FAIL: busy after the last frame"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
