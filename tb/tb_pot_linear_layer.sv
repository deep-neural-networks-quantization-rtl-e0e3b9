// tb_pot_linear_layer: self-checking test of the PoT quantised layer at its
// default size (8 PEs, 64 inputs). Random weight codes, biases and FP32
// scales are written into the layer's memories, then several input vectors
// are streamed with random gaps in a_valid. Every INT8 output is compared
// with a reference (bias + sum of activation times weight value, scaled,
// rounded half away from zero, clamped), and q_valid must come exactly three
// cycles after the last activation. Zero weights, negative weights and
// saturation are counted and must all occur.
module tb_pot_linear_layer;
  import pot_pkg::*;
  localparam int NPE = 8, NIN = 64;
  logic clk = 0, rst_n = 0;
  logic wmem_we = 0, bias_we = 0, scale_we = 0;
  logic [5:0] wmem_addr = '0;
  logic [NPE*W_W-1:0] wmem_data = '0;
  logic [2:0] bias_idx = '0, scale_idx = '0;
  acc_t  bias_data = '0;
  fp32_t scale_data = '0;
  logic start = 0, a_valid = 0, busy, q_valid;
  act_t a = '0;
  act_t q [NPE];
  int checks = 0, failures = 0;
  int n_zero = 0, n_neg = 0, n_sat = 0, n_gap = 0;

  wcode_t wv [NIN][NPE];
  acc_t   bv [NPE];
  fp32_t  sv [NPE];

  pot_linear_layer dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
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

  initial begin
    act_t av [NIN];
    int   last_cycle, cyc;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int vec = 0; vec < 12; vec++) begin
      // new parameters every few vectors
      if (vec % 3 == 0) begin
        for (int i = 0; i < NIN; i++) begin
          @(negedge clk);
          wmem_we = 1; wmem_addr = 6'(i);
          for (int p = 0; p < NPE; p++) begin
            wv[i][p] = wcode_t'($urandom_range(0, 15));
            wmem_data[p*W_W +: W_W] = wv[i][p];
          end
        end
        @(negedge clk); wmem_we = 0;
        for (int p = 0; p < NPE; p++) begin
          bv[p] = acc_t'($signed($urandom_range(0, 4000)) - 2000);
          sv[p] = {1'($urandom_range(0, 1)), 8'($urandom_range(127 - 14, 127 - 8)), 23'($urandom)};
          @(negedge clk); bias_we = 1; bias_idx = 3'(p); bias_data = bv[p];
          scale_we = 1; scale_idx = 3'(p); scale_data = sv[p];
        end
        @(negedge clk); bias_we = 0; scale_we = 0;
      end
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      for (int i = 0; i < NIN; i++) begin
        while ($urandom_range(0, 3) == 0) begin
          a_valid = 0; n_gap++; @(negedge clk);
        end
        av[i] = act_t'($urandom_range(0, 255));
        a_valid = 1; a = av[i];
        @(negedge clk);
      end
      a_valid = 0; a = 8'h55;
      cyc = 1;
      while (!q_valid && cyc < 20) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != 3) begin failures++; $display("FAIL: q_valid %0d cycles after the last input, expected 3", cyc); end
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
        if (e == 127 || e == -128) n_sat++;
        checks++;
        if (int'(q[p]) != e) begin
          failures++;
          $display("FAIL vec %0d pe %0d: q=%0d expected %0d (sum %0d)", vec, p, q[p], e, s);
        end
      end
      @(negedge clk);
      checks++;
      if (busy) begin failures++; $display("FAIL: busy after the result"); end
    end
    $display("zero weights %0d, negative weights %0d, saturated outputs %0d, input gaps %0d", n_zero, n_neg, n_sat, n_gap);
    checks++;
    if (n_zero == 0 || n_neg == 0 || n_sat == 0 || n_gap == 0) begin failures++; $display("FAIL: a mechanism was not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
