// context_gen: the delay context generator of a convolution block.
//
// Pixels of C binary channels arrive in raster order, at most one per cycle
// (pix_valid). K-1 line buffers keep the previous rows and a K x K register
// window shifts one column per pixel. For every pixel that completes a full
// window (row >= K-1 and column >= K-1: stride 1, no padding) win_valid is high
// in the next cycle. Window bit order: win[((r*K + c)*C) + ch], r = 0 the
// oldest row, c = 0 the leftmost column. Counters wrap at the end of a frame,
// so frames may follow each other back to back.
//
// The line-buffer window generator is how the block's role ("Delay, context
// generator") is realised here; stride, padding and bit order are this
// design's choices.
module context_gen #(
  parameter int unsigned IMG_W = 32,
  parameter int unsigned IMG_H = 32,
  parameter int unsigned K     = 5,
  parameter int unsigned C     = 3
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             pix_valid,
  input  logic [C-1:0]     pix,
  output logic             win_valid,
  output logic [K*K*C-1:0] win
);
  localparam int unsigned XW = $clog2(IMG_W);
  localparam int unsigned YW = $clog2(IMG_H);

  logic [C-1:0]  lb  [K-1][IMG_W];
  logic [C-1:0]  wreg[K][K];
  logic [C-1:0]  colv[K];
  logic [XW-1:0] col;
  logic [YW-1:0] row;

  always_comb begin
    for (int r = 0; r < K - 1; r++) colv[r] = lb[r][col];
    colv[K-1] = pix;
  end

  always_ff @(posedge clk) begin
    if (pix_valid) begin
      for (int r = 0; r < K - 1; r++) lb[r][col] <= colv[r+1];
      for (int r = 0; r < K; r++) begin
        for (int c = 0; c < K - 1; c++) wreg[r][c] <= wreg[r][c+1];
        wreg[r][K-1] <= colv[r];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col       <= '0;
      row       <= '0;
      win_valid <= 1'b0;
    end else begin
      win_valid <= pix_valid && (row >= YW'(K - 1)) && (col >= XW'(K - 1));
      if (pix_valid) begin
        if (col == XW'(IMG_W - 1)) begin
          col <= '0;
          row <= (row == YW'(IMG_H - 1)) ? '0 : row + 1'b1;
        end else begin
          col <= col + 1'b1;
        end
      end
    end
  end

  always_comb
    for (int r = 0; r < K; r++)
      for (int c = 0; c < K; c++)
        win[(r*K + c)*C +: C] = wreg[r][c];
endmodule
