// tb_vision_accel_top: end-to-end test of the whole design at its default
// parameters. Both accelerators run at the same time:
//  * the PoT layer (8 PEs, 64 inputs) gets random weight codes, biases and
//    FP32 scales and computes ten INT8 output vectors from input vectors
//    streamed with gaps; every output is compared with a reference and must
//    appear 3 cycles after the last input;
//  * the XNOR CNN (32x32x3 input, LeNet5-like layers, 43 classes) gets
//    random weights and classifies three random frames back to back, each
//    image written right behind layer 1's reader; every class score is
//    compared with the reference model.
// Each mechanism is counted and must occur at least once: zero and negative
// PoT weights, input gaps (stalls), requantisation saturation at both ends,
// completion of each feature-map BRAM, the serializer runs of each dense
// block, and a frame started while the previous one is still in flight.
module tb_vision_accel_top;
  import pot_pkg::*;
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
  int mech [11];
  bit imgs [NFR][];
  int exp_score [NFR][];
  longint t_start [NFR];

  // PoT layer signals
  localparam int NPE = 8, NIN = 64;
  logic pot_wmem_we = 0, pot_bias_we = 0, pot_scale_we = 0;
  logic [5:0] pot_wmem_addr = '0;
  logic [NPE*W_W-1:0] pot_wmem_data = '0;
  logic [2:0] pot_bias_idx = '0, pot_scale_idx = '0;
  acc_t  pot_bias_data = '0;
  fp32_t pot_scale_data = '0;
  logic pot_start = 0, pot_a_valid = 0, pot_busy, pot_q_valid;
  act_t pot_a = '0;
  act_t pot_q [NPE];
  int n_zero = 0, n_neg = 0, n_sat_hi = 0, n_sat_lo = 0, n_gap = 0;
  int n_wr1 = 0, n_wr2 = 0, n_db1 = 0, n_db2 = 0, n_db3 = 0;
  bit pot_finished = 0;

  vision_accel_top dut (
    .clk, .rst_n,
    .pot_wmem_we, .pot_wmem_addr, .pot_wmem_data, .pot_bias_we, .pot_bias_idx, .pot_bias_data,
    .pot_scale_we, .pot_scale_idx, .pot_scale_data, .pot_start, .pot_a_valid, .pot_a,
    .pot_busy, .pot_q_valid, .pot_q,
    .xn_cfg(cfg), .xn_in_we(in_we), .xn_in_addr(in_addr), .xn_in_data(in_data), .xn_start(start),
    .xn_ready(ready), .xn_in_ready(in_ready), .xn_busy(busy),
    .xn_score_valid(score_valid), .xn_score_idx(score_idx), .xn_score(score), .xn_done(done)
  );

  // Mechanism counters, taken from inside the hierarchy.
  always @(posedge clk) begin
    if (dut.u_xnor.u_wr1.done) n_wr1++;
    if (dut.u_xnor.u_wr2.done) n_wr2++;
    if (dut.u_xnor.u_db1.acc_done) n_db1++;
    if (dut.u_xnor.u_db2.acc_done) n_db2++;
    if (dut.u_xnor.u_db3.acc_done) n_db3++;
  end

  function automatic int ref_q(input longint x, input fp32_t s);
    real y, m;
    longint r;
    y = real'(x) * real'({1'b1, s[22:0]}) * (2.0 ** (real'(int'(s[30:23])) - 150.0));
    if (s[31]) y = -y;
    m = (y < 0) ? -y : y;
    r = longint'($floor(m + 0.5));
    if (y < 0) r = -r;
    if (r > 127) return 127;
    if (r < -128) return -128;
    return int'(r);
  endfunction

  // PoT layer stimulus and checking.
  initial begin
    wcode_t wv [NIN][NPE];
    acc_t   bv [NPE];
    fp32_t  sv [NPE];
    act_t   av [NIN];
    int     cnt;
    @(posedge rst_n);
    for (int vec = 0; vec < 10; vec++) begin
      if (vec % 2 == 0) begin
        for (int i = 0; i < NIN; i++) begin
          @(negedge clk);
          pot_wmem_we = 1; pot_wmem_addr = 6'(i);
          for (int p = 0; p < NPE; p++) begin
            wv[i][p] = wcode_t'($urandom_range(0, 15));
            pot_wmem_data[p*W_W +: W_W] = wv[i][p];
          end
        end
        @(negedge clk); pot_wmem_we = 0;
        for (int p = 0; p < NPE; p++) begin
          bv[p] = acc_t'($signed($urandom_range(0, 4000)) - 2000);
          sv[p] = {1'($urandom_range(0, 1)), 8'($urandom_range(127 - 14, 127 - 6)), 23'($urandom)};
          @(negedge clk);
          pot_bias_we = 1; pot_bias_idx = 3'(p); pot_bias_data = bv[p];
          pot_scale_we = 1; pot_scale_idx = 3'(p); pot_scale_data = sv[p];
        end
        @(negedge clk); pot_bias_we = 0; pot_scale_we = 0;
      end
      @(negedge clk); pot_start = 1;
      @(negedge clk); pot_start = 0;
      for (int i = 0; i < NIN; i++) begin
        while ($urandom_range(0, 4) == 0) begin pot_a_valid = 0; n_gap++; @(negedge clk); end
        av[i] = act_t'($urandom_range(0, 255));
        pot_a_valid = 1; pot_a = av[i];
        @(negedge clk);
      end
      pot_a_valid = 0;
      cnt = 1;
      while (!pot_q_valid && cnt < 20) begin @(negedge clk); cnt++; end
      checks++;
      if (cnt != 3) begin failures++; $display("FAIL: PoT result %0d cycles after the last input", cnt); end
      for (int p = 0; p < NPE; p++) begin
        longint s;
        int e;
        s = longint'(bv[p]);
        for (int i = 0; i < NIN; i++) begin
          s += longint'(pot_value(wv[i][p])) * longint'(av[i]);
          if (wv[i][p][3:1] == 0) n_zero++;
          else if (wv[i][p][0]) n_neg++;
        end
        e = ref_q(s, sv[p]);
        if (e == 127) n_sat_hi++;
        if (e == -128) n_sat_lo++;
        checks++;
        if (int'(pot_q[p]) != e) begin failures++; $display("FAIL PoT vec %0d pe %0d: %0d expected %0d", vec, p, pot_q[p], e); end
      end
    end
    pot_finished = 1;
  end
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (600000) @(posedge clk);
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
    wait (pot_finished);
    $display("mechanisms: zero weights %0d, negative weights %0d, input gaps %0d, saturation +%0d/-%0d",
             n_zero, n_neg, n_gap, n_sat_hi, n_sat_lo);
    $display("            BRAM1 complete %0d, BRAM2 complete %0d, serializer runs %0d/%0d/%0d, overlapped starts %0d",
             n_wr1, n_wr2, n_db1, n_db2, n_db3, n_overlap);
    mech = '{n_zero, n_neg, n_gap, n_sat_hi, n_sat_lo, n_wr1, n_wr2, n_db1, n_db2, n_db3, n_overlap};
    foreach (mech[i]) begin
      checks++;
      if (mech[i] == 0) begin failures++; $display("FAIL: mechanism %0d never happened", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
