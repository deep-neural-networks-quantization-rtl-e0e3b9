// ppe: point processing element: batch normalisation and binary activation.
//
// val = x * bn_mul + bn_add, and the activation bit is 1 (+1) when val >= 0,
// else 0 (-1). bn_mul and bn_add come from the block's BN register. One
// register stage: out_valid, val and bit follow in_valid by one cycle.
//
// BN followed by a {-1, 1} activation follows the published block diagram;
// evaluating BN as a 16-bit integer multiply-add is this design's choice.
module ppe
  import xnor_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [SUM_W-1:0] x,
  input  logic signed [BN_W-1:0]  bn_mul,
  input  logic signed [BN_W-1:0]  bn_add,
  output logic                    out_valid,
  output logic signed [VAL_W-1:0] val,
  output logic                    bit_out
);
  logic signed [VAL_W-1:0] bn;

  assign bn = VAL_W'(x) * VAL_W'(bn_mul) + VAL_W'(bn_add);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      val       <= '0;
      bit_out   <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        val     <= bn;
        bit_out <= (bn >= 0);
      end
    end
  end
endmodule
