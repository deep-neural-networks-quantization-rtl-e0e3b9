// tb_conv_block: self-checking test of one convolution block on a reduced
// layer: 10x10 image, 2 input channels, 3x3 filters, 3 filters. Weights,
// biases and BN parameters are written over the configuration bus; two
// random frames stream through (the second with random gaps) and every
// pooled output pixel is compared with the reference model. With a gap-free
// stream each output must leave 4 cycles after the pixel completing its
// pooling window. Both activation values must occur.
module tb_conv_block;
  import xnor_pkg::*;
  import xnor_ref_pkg::*;
  localparam int W = 10, H = 10, C = 2, K = 3, F = 3;
  localparam int N = K * K * C, NW = (N + 31) / 32, PW = (W - K + 1) / 2;
  logic clk = 0, rst_n = 0, pix_valid = 0, out_valid;
  cfg_t cfg = '0;
  logic [C-1:0] pix = '0;
  logic [F-1:0] out;
  int checks = 0, failures = 0, n_pos = 0, n_neg = 0;
  longint cyc = 0;

  conv_block #(.IMG_W(W), .IMG_H(H), .C_IN(C), .K(K), .F(F), .T_BASE(3)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (100000) @(posedge clk);
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

  bit img[], wts[], exp_out[];
  int bias[], mul[], add[];
  longint t_in [H][W];

  initial begin
    wts = new[F * N]; bias = new[F]; mul = new[F]; add = new[F]; img = new[W * H * C];
    foreach (wts[i]) wts[i] = 1'($urandom);
    for (int f = 0; f < F; f++) begin
      logic [NW*32-1:0] v;
      bias[f] = $urandom_range(0, 6) - 3;
      mul[f]  = (f == 1) ? -2 : 1 + f;
      add[f]  = $urandom_range(0, 8) - 4;
      v = '0;
      for (int i = 0; i < N; i++) v[i] = wts[f * N + i];
      for (int wd = 0; wd < NW; wd++) cfg_write(3 + T_W, f, wd, v[wd*32 +: 32]);
      cfg_write(3 + T_B, f, 0, 32'(bias[f]));
      cfg_write(3 + T_BN, f, 0, {16'(mul[f]), 16'(add[f])});
    end
    // a write to another layer's target must not disturb this block
    cfg_write(0 + T_B, 0, 0, 32'h7fff);
    rst_n = 1;
    for (int fr = 0; fr < 2; fr++) begin
      int k;
      foreach (img[i]) img[i] = 1'($urandom);
      conv_layer(img, W, H, C, K, F, wts, bias, mul, add, exp_out);
      fork
        begin
          for (int y = 0; y < H; y++)
            for (int x = 0; x < W; x++) begin
              @(negedge clk);
              pix_valid = 0;
              if (fr == 1) while ($urandom_range(0, 3) == 0) @(negedge clk);
              pix_valid = 1;
              for (int ch = 0; ch < C; ch++) pix[ch] = img[(y * W + x) * C + ch];
              t_in[y][x] = cyc;
            end
          @(negedge clk);
          pix_valid = 0;
        end
        begin
          k = 0;
          while (k < PW * PW) begin
            @(posedge clk);
            #1;
            if (out_valid) begin
              int py, px;
              py = k / PW; px = k % PW;
              for (int f = 0; f < F; f++) begin
                checks++;
                if (out[f] != exp_out[k * F + f]) begin
                  failures++; $display("FAIL frame %0d pixel %0d filter %0d: %0d expected %0d", fr, k, f, out[f], exp_out[k * F + f]);
                end
                if (out[f]) n_pos++; else n_neg++;
              end
              if (fr == 0) begin
                checks++;
                if (cyc - t_in[K + 2 * py][K + 2 * px] != 4) begin
                  failures++; $display("FAIL: latency %0d", cyc - t_in[K + 2 * py][K + 2 * px]);
                end
              end
              k++;
            end
          end
        end
      join
    end
    checks++;
    if (n_pos == 0 || n_neg == 0) begin failures++; $display("FAIL: one activation value never occurred"); end
    $display("activations +1: %0d, -1: %0d", n_pos, n_neg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
