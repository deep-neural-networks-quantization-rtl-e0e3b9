// requant: requantisation (ReQ) unit of the PoT layer.
//
// Each of LANES INT32 accumulators is multiplied by its own FP32 scaling
// factor and rounded and saturated to INT8. The float is never converted: the
// accumulator's magnitude is multiplied by the 24-bit significand (1.f), then
// shifted by the exponent minus 150 with round-to-nearest, ties away from
// zero, then the sign (accumulator sign xor scale sign) is applied and the
// result clamped to [-128, 127]. A zero or denormal scale gives 0; infinity
// and NaN are not expected. One register stage: q and out_valid follow
// in_valid by one cycle.
//
// One scale per output map follows the published batch-norm fusion (the BN
// multiplier is merged into the scaling factor); the rounding mode, the
// saturation and the exact integer evaluation are this design's choices.
module requant
  import pot_pkg::*;
#(
  parameter int unsigned LANES = 8
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  acc_t  acc   [LANES],
  input  fp32_t scale [LANES],
  output logic  out_valid,
  output act_t  q     [LANES]
);
  localparam int signed QMAX = (1 <<< (A_W - 1)) - 1;
  localparam int signed QMIN = -(1 <<< (A_W - 1));

  function automatic act_t rq(input acc_t x, input fp32_t s);
    logic [7:0]  e;
    logic [23:0] sig;
    logic [31:0] mag;
    logic [55:0] prod;
    logic [55:0] rounded;
    int          sh;
    logic        neg;
    logic [55:0] half;
    e   = s[30:23];
    sig = {1'b1, s[22:0]};
    neg = x[ACC_W-1] ^ s[31];
    mag = x[ACC_W-1] ? 32'(-x) : 32'(x);
    if (e == 8'd0 || x == '0) return '0;
    prod = 56'(mag) * 56'(sig);
    sh   = int'(e) - 150;
    if (sh >= 0) begin
      // Scale >= 2^23: any non-zero accumulator saturates.
      return neg ? act_t'(QMIN) : act_t'(QMAX);
    end else if (sh < -55) begin
      return '0;
    end
    half    = 56'(1) << (-sh - 1);
    rounded = (prod + half) >> (-sh);
    if (neg) return (rounded > 56'(-QMIN)) ? act_t'(QMIN) : act_t'(-$signed(rounded[A_W:0]));
    else     return (rounded > 56'(QMAX))  ? act_t'(QMAX) : act_t'(rounded[A_W-1:0]);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int i = 0; i < LANES; i++) q[i] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid)
        for (int i = 0; i < LANES; i++) q[i] <= rq(acc[i], scale[i]);
    end
  end
endmodule
