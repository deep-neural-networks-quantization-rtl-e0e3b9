// pot_pkg: shared widths and types of the power-of-two (PoT) quantised layer.
//
// Weights are 4-bit PoT codes, activations are signed INT8, accumulators and
// biases are INT32 and the per-output scaling factors are IEEE-754 single
// precision words. A weight code holds a sign bit (bit 0, 1 = negative) and a
// 3-bit shift field (bits 3:1); shift field 0 is the zero weight, 1..7 stand
// for 2^1 .. 2^7 times the layer's smallest step, which is folded into the
// scaling factor.
package pot_pkg;
  localparam int unsigned A_W   = 8;   // activation width (INT8)
  localparam int unsigned W_W   = 4;   // weight code width (INT4)
  localparam int unsigned ACC_W = 32;  // accumulator and bias width (INT32)
  localparam int unsigned SF_W  = 32;  // FP32 scaling factor

  typedef logic signed [A_W-1:0]   act_t;
  typedef logic        [W_W-1:0]   wcode_t;
  typedef logic signed [ACC_W-1:0] acc_t;
  typedef logic        [SF_W-1:0]  fp32_t;

  // Real value of a weight code in units of the smallest step (0, +-2..+-128).
  function automatic int signed pot_value(input wcode_t w);
    int signed m;
    if (w[W_W-1:1] == '0) return 0;
    m = 1 << w[W_W-1:1];
    return w[0] ? -m : m;
  endfunction
endpackage
