// xnor_acc: XNOR and accumulate for one binary filter.
//
// y = 2 * popcount(XNOR(x, w)) - N + bias, the +1/-1 dot product of an
// N-bit window with the filter's N weight bits plus the filter's bias
// register. Registered: out_valid/y follow in_valid by one cycle.
//
// The XNOR-popcount form of the binary convolution follows the published
// formulation; the bias width and the single-cycle evaluation of the whole
// window are this design's choices.
module xnor_acc
  import xnor_pkg::*;
#(
  parameter int unsigned N = 75
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic [N-1:0]            x,
  input  logic [N-1:0]            w,
  input  logic signed [SUM_W-1:0] bias,
  output logic                    out_valid,
  output logic signed [SUM_W-1:0] y
);
  logic [N-1:0] agree;
  int unsigned  cnt;

  always_comb begin
    agree = ~(x ^ w);
    cnt   = 0;
    for (int i = 0; i < N; i++) cnt += 32'(agree[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      y         <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) y <= SUM_W'(bin_dot(cnt, N)) + bias;
    end
  end
endmodule
