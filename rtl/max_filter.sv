// max_filter: 2x2, stride-2 max pooling on a raster stream of LANES parallel
// signed sums (one lane per filter).
//
// The input is the IN_W x IN_H map of a convolution, one position per valid
// cycle in raster order. On even rows the maximum of each horizontal pair is
// kept in a line of IN_W/2 entries; on odd rows it is combined with the new
// pair, and the pooled value leaves one cycle after the fourth input of its
// window. IN_W and IN_H must be even. Counters wrap at the end of a frame.
//
// The block's place between accumulation and batch norm follows the published
// block diagram; the 2x2 window is this design's choice.
module max_filter
  import xnor_pkg::*;
#(
  parameter int unsigned LANES = 6,
  parameter int unsigned IN_W  = 28,
  parameter int unsigned IN_H  = 28
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [SUM_W-1:0] x [LANES],
  output logic                    out_valid,
  output logic signed [SUM_W-1:0] y [LANES]
);
  localparam int unsigned XW = $clog2(IN_W);
  localparam int unsigned YW = $clog2(IN_H);

  logic signed [SUM_W-1:0] part [IN_W/2][LANES];
  logic signed [SUM_W-1:0] hold [LANES];
  logic [XW-1:0]           col;
  logic [YW-1:0]           row;

  function automatic logic signed [SUM_W-1:0] smax(input logic signed [SUM_W-1:0] a,
                                                   input logic signed [SUM_W-1:0] b);
    return (a > b) ? a : b;
  endfunction

  always_ff @(posedge clk) begin
    if (in_valid) begin
      for (int l = 0; l < LANES; l++) begin
        unique case ({row[0], col[0]})
          2'b00: hold[l] <= x[l];
          2'b01: part[col[XW-1:1]][l] <= smax(hold[l], x[l]);
          2'b10: hold[l] <= smax(part[col[XW-1:1]][l], x[l]);
          2'b11: y[l] <= smax(hold[l], x[l]);
        endcase
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col       <= '0;
      row       <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid && row[0] && col[0];
      if (in_valid) begin
        if (col == XW'(IN_W - 1)) begin
          col <= '0;
          row <= (row == YW'(IN_H - 1)) ? '0 : row + 1'b1;
        end else begin
          col <= col + 1'b1;
        end
      end
    end
  end
endmodule
