// pot_conv_runner: testbench helper that runs one 3x3 convolution layer of
// a ResNet-style network through a PoT layer (pot_linear_layer) and checks
// every output.
//
// The layer has C input channels on an H x W map, stride 1 and zero padding
// of 1, and N_PE output channels, the slice of the layer's filters that one
// pass of the PE row computes. The runner acts as the controller the layer
// would sit behind:
//   1. It loads random 4-bit PoT codes for the slice. Word i holds input
//      i = (ky*3 + kx)*C + c.
//   2. It loads a random INT32 bias and a random FP32 scale per output
//      channel. This is where a fused batch normalisation would put its
//      per-channel multiplier and offset.
//   3. For every output pixel it pulses start, streams the 9*C window
//      activations (zeros outside the image), waits for q_valid and compares
//      the N_PE INT8 outputs with a reference convolution. The reference is
//      the integer sum, then the scale in double precision, rounded half
//      away from zero and clamped.
// Input activations are INT8 values in 0..127, as after a ReLU. q_valid must
// come exactly 3 cycles after the last activation of each window, and busy
// must be low in the cycle after it.
//
// Layer shapes come from the ResNet family the PoT weights were evaluated on.
// The sampling of weights, scales and activations is this testbench's own.
// Results are returned through checks/failures, and finished rises at the
// end. The run is driven on the falling clock edge.
module pot_conv_runner #(
  parameter string       NAME = "layer",
  parameter int unsigned C    = 16,
  parameter int unsigned H    = 32,
  parameter int unsigned W    = 32,
  parameter int unsigned N_PE = 16
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic finished
);
  import pot_pkg::*;
  localparam int unsigned NIN = 9 * C;
  localparam int unsigned IW  = $clog2(NIN);
  localparam int unsigned PW  = (N_PE > 1) ? $clog2(N_PE) : 1;

  logic wmem_we = 0, bias_we = 0, scale_we = 0;
  logic [IW-1:0] wmem_addr = '0;
  logic [N_PE*W_W-1:0] wmem_data = '0;
  logic [PW-1:0] bias_idx = '0, scale_idx = '0;
  acc_t  bias_data = '0;
  fp32_t scale_data = '0;
  logic start = 0, a_valid = 0, busy, q_valid;
  act_t a = '0;
  act_t q [N_PE];

  pot_linear_layer #(.N_PE(N_PE), .N_IN(NIN)) u_layer (
    .clk, .rst_n, .wmem_we, .wmem_addr, .wmem_data,
    .bias_we, .bias_idx, .bias_data, .scale_we, .scale_idx, .scale_data,
    .start, .a_valid, .a, .busy, .q_valid, .q
  );

  wcode_t wv [NIN][N_PE];
  acc_t   bv [N_PE];
  fp32_t  sv [N_PE];
  act_t   img [H][W][C];

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

  function automatic act_t pix(input int y, input int x, input int c);
    if (y < 0 || y >= int'(H) || x < 0 || x >= int'(W)) return '0;
    return img[y][x][c];
  endfunction

  initial begin
    int n_sat, n_zero_out, lat_bad;
    act_t win [NIN];
    checks = 0; failures = 0; finished = 0;
    n_sat = 0; n_zero_out = 0; lat_bad = 0;
    for (int y = 0; y < int'(H); y++)
      for (int x = 0; x < int'(W); x++)
        for (int c = 0; c < int'(C); c++)
          img[y][x][c] = act_t'($urandom_range(0, 127));
    wait (rst_n);
    @(negedge clk);
    for (int i = 0; i < int'(NIN); i++) begin
      wmem_we = 1; wmem_addr = IW'(i);
      for (int p = 0; p < int'(N_PE); p++) begin
        wv[i][p] = wcode_t'($urandom_range(0, 15));
        wmem_data[p*W_W +: W_W] = wv[i][p];
      end
      @(negedge clk);
    end
    wmem_we = 0;
    for (int p = 0; p < int'(N_PE); p++) begin
      bv[p] = acc_t'($signed($urandom_range(0, 20000)) - 10000);
      // Per-channel scale, 2^-14 .. 2^-9 in magnitude, either sign.
      sv[p] = {1'($urandom_range(0, 1)), 8'($urandom_range(127 - 14, 127 - 10)), 23'($urandom)};
      bias_we = 1; bias_idx = PW'(p); bias_data = bv[p];
      scale_we = 1; scale_idx = PW'(p); scale_data = sv[p];
      @(negedge clk);
    end
    bias_we = 0; scale_we = 0;

    for (int y = 0; y < int'(H); y++) begin
      for (int x = 0; x < int'(W); x++) begin
        int cyc;
        for (int ky = 0; ky < 3; ky++)
          for (int kx = 0; kx < 3; kx++)
            for (int c = 0; c < int'(C); c++)
              win[(ky*3 + kx)*C + c] = pix(y + ky - 1, x + kx - 1, c);
        start = 1;
        @(negedge clk);
        start = 0;
        for (int i = 0; i < int'(NIN); i++) begin
          a_valid = 1; a = win[i];
          @(negedge clk);
        end
        a_valid = 0;
        cyc = 1;
        while (!q_valid && cyc < 20) begin @(negedge clk); cyc++; end
        checks++;
        if (cyc != 3) begin
          failures++; lat_bad++;
          if (lat_bad < 5) $display("FAIL %s (%0d,%0d): q_valid %0d cycles after the last input, expected 3", NAME, y, x, cyc);
        end
        for (int p = 0; p < int'(N_PE); p++) begin
          longint s;
          int e;
          s = longint'(bv[p]);
          for (int i = 0; i < int'(NIN); i++)
            s += longint'(pot_value(wv[i][p])) * longint'(win[i]);
          e = ref_q(s, sv[p]);
          if (e == 127 || e == -128) n_sat++;
          if (e == 0) n_zero_out++;
          checks++;
          if (int'(q[p]) != e) begin
            failures++;
            if (failures < 10) $display("FAIL %s (%0d,%0d) ch %0d: q=%0d expected %0d (sum %0d)", NAME, y, x, p, q[p], e, s);
          end
        end
        @(negedge clk);
        checks++;
        if (busy) begin
          failures++;
          if (failures < 10) $display("FAIL %s (%0d,%0d): busy after the result", NAME, y, x);
        end
      end
    end
    $display("%s: %0d x %0d x %0d -> %0d channels, %0d outputs checked, %0d saturated, %0d zero",
             NAME, H, W, C, N_PE, H*W*N_PE, n_sat, n_zero_out);
    finished = 1;
  end
endmodule
