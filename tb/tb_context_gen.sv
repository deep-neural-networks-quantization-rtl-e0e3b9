// tb_context_gen: self-checking test of the window generator on a reduced
// 9x7 image with 2 channels and a 3x3 window. Two random frames stream with
// random gaps; every window must match the image around its position, come
// one cycle after the pixel that completes it, and the number of windows per
// frame must be (9-2)*(7-2).
module tb_context_gen;
  localparam int W = 9, H = 7, K = 3, C = 2;
  logic clk = 0, rst_n = 0, pix_valid = 0, win_valid;
  logic [C-1:0] pix = '0;
  logic [K*K*C-1:0] win;
  int checks = 0, failures = 0;
  logic [C-1:0] img [H][W];

  context_gen #(.IMG_W(W), .IMG_H(H), .K(K), .C(C)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nwin;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int fr = 0; fr < 3; fr++) begin
      nwin = 0;
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) img[y][x] = C'($urandom);
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          @(negedge clk);
          pix_valid = 0;
          while ($urandom_range(0, 4) == 0) @(negedge clk);
          pix_valid = 1; pix = img[y][x];
          @(negedge clk);
          pix_valid = 0;
          checks++;
          if (win_valid != (y >= K - 1 && x >= K - 1)) begin
            failures++; $display("FAIL: win_valid=%0d at (%0d,%0d)", win_valid, y, x);
          end
          if (win_valid) begin
            logic [K*K*C-1:0] e;
            nwin++;
            for (int r = 0; r < K; r++)
              for (int c = 0; c < K; c++)
                e[(r*K + c)*C +: C] = img[y-K+1+r][x-K+1+c];
            checks++;
            if (win !== e) begin failures++; $display("FAIL: window at (%0d,%0d) %h expected %h", y, x, win, e); end
          end
        end
      checks++;
      if (nwin != (W-K+1)*(H-K+1)) begin failures++; $display("FAIL: %0d windows", nwin); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
