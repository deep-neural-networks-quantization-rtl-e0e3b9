// xnor_pkg: shared types and layer sizes of the binary (XNOR) CNN accelerator.
//
// Binary values are stored as bits, 1 for +1 and 0 for -1. The default
// network is a LeNet5-like classifier for 32x32 images with 3 binary input
// channels: two 5x5 convolution blocks (6 and 16 filters, each followed by
// 2x2 max pooling) and three dense blocks (400 -> 120 -> 84 -> 43 classes).
//
// All weight, bias and batch-norm registers are written over one
// configuration bus, cfg_t. target selects the register set: layer L
// (0 = first conv block ... 4 = last dense block) owns targets 3L (weights),
// 3L+1 (biases) and 3L+2 (batch norm). row and col index inside the set (see
// each block), data carries the value.
package xnor_pkg;
  typedef struct packed {
    logic        en;
    logic [3:0]  target;
    logic [15:0] row;
    logic [15:0] col;
    logic [31:0] data;
  } cfg_t;

  localparam int unsigned T_W  = 0;  // weight offset inside a layer's targets
  localparam int unsigned T_B  = 1;  // bias offset
  localparam int unsigned T_BN = 2;  // batch-norm offset

  localparam int unsigned SUM_W = 16;  // width of conv and dense sums
  localparam int unsigned BN_W  = 16;  // width of BN multiplier and offset
  localparam int unsigned VAL_W = 32;  // width of the BN result

  // Default network
  localparam int unsigned IMG      = 32;
  localparam int unsigned C0       = 3;
  localparam int unsigned K1       = 5;
  localparam int unsigned F1       = 6;
  localparam int unsigned K2       = 5;
  localparam int unsigned F2       = 16;
  localparam int unsigned FC1_OUT  = 120;
  localparam int unsigned FC2_OUT  = 84;
  localparam int unsigned N_CLASS  = 43;

  // 2 * popcount(xnor(x, w)) - n : the +1/-1 dot product of two bit vectors.
  function automatic int signed bin_dot(input int unsigned agree_cnt, input int unsigned n);
    return 2 * int'(agree_cnt) - int'(n);
  endfunction
endpackage
