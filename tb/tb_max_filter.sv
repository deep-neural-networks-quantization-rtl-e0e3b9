// tb_max_filter: self-checking test of 2x2 max pooling on a reduced 8x6 map
// with 3 lanes. Random signed values stream with gaps over three frames;
// each pooled output must be the maximum of its 2x2 window and appear one
// cycle after the window's last input, 12 per frame.
module tb_max_filter;
  import xnor_pkg::*;
  localparam int L = 3, W = 8, H = 6;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic signed [SUM_W-1:0] x [L], y [L];
  int checks = 0, failures = 0;
  int img [H][W][L];

  max_filter #(.LANES(L), .IN_W(W), .IN_H(H)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nout;
    for (int l = 0; l < L; l++) x[l] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int fr = 0; fr < 3; fr++) begin
      nout = 0;
      for (int r = 0; r < H; r++)
        for (int c = 0; c < W; c++)
          for (int l = 0; l < L; l++) img[r][c][l] = $signed($urandom_range(0, 2000)) - 1000;
      for (int r = 0; r < H; r++)
        for (int c = 0; c < W; c++) begin
          @(negedge clk);
          in_valid = 0;
          while ($urandom_range(0, 3) == 0) @(negedge clk);
          in_valid = 1;
          for (int l = 0; l < L; l++) x[l] = SUM_W'(img[r][c][l]);
          @(negedge clk);
          in_valid = 0;
          checks++;
          if (out_valid != (r % 2 == 1 && c % 2 == 1)) begin failures++; $display("FAIL: out_valid at (%0d,%0d)", r, c); end
          if (out_valid) begin
            nout++;
            for (int l = 0; l < L; l++) begin
              int e;
              e = img[r-1][c-1][l];
              if (img[r-1][c][l] > e) e = img[r-1][c][l];
              if (img[r][c-1][l] > e) e = img[r][c-1][l];
              if (img[r][c][l] > e) e = img[r][c][l];
              checks++;
              if (int'(y[l]) != e) begin failures++; $display("FAIL: (%0d,%0d) lane %0d y=%0d expected %0d", r, c, l, y[l], e); end
            end
          end
        end
      checks++;
      if (nout != (W/2)*(H/2)) begin failures++; $display("FAIL: %0d outputs", nout); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
