// conv_block: one binary convolution layer (Convolutional Block), parallel
// over its F filters.
//
// Pixels of C_IN binary channels stream in raster order, one per cycle at
// most. The context generator forms K x K windows; F XNOR/accumulate units,
// one per filter, compare the window with the filter's weight register and
// add its bias register; the max filter pools 2x2; F point processing
// elements apply batch norm and the sign activation. out_valid/out carry one
// pooled output pixel with one bit per filter. Latency from the pixel that
// completes a pooling window to out_valid is 4 cycles.
//
// Configuration (cfg_t, targets T_BASE + 0/1/2):
//   weights: row = filter, col = 32-bit word index, data = window bits
//            32*col .. 32*col+31 (bit order as in context_gen);
//   bias:    row = filter, data[15:0] signed;
//   BN:      row = filter, data[31:16] multiplier, data[15:0] offset.
//
// The chain context generator -> XNOR -> Acc (with bias register) -> max
// filter -> BN -> activation, with per-filter weight, bias and BN registers,
// follows the published block diagram. The configuration bus and the 2x2
// pooling are this design's choices.
module conv_block
  import xnor_pkg::*;
#(
  parameter int unsigned IMG_W  = 32,
  parameter int unsigned IMG_H  = 32,
  parameter int unsigned C_IN   = 3,
  parameter int unsigned K      = 5,
  parameter int unsigned F      = 6,
  parameter int unsigned T_BASE = 0
) (
  input  logic            clk,
  input  logic            rst_n,
  input  cfg_t            cfg,
  input  logic            pix_valid,
  input  logic [C_IN-1:0] pix,
  output logic            out_valid,
  output logic [F-1:0]    out
);
  localparam int unsigned N      = K * K * C_IN;
  localparam int unsigned NWORDS = (N + 31) / 32;
  localparam int unsigned OW     = IMG_W - K + 1;
  localparam int unsigned OH     = IMG_H - K + 1;
  localparam int unsigned FW     = (F > 1) ? $clog2(F) : 1;
  localparam int unsigned WW     = (NWORDS > 1) ? $clog2(NWORDS) : 1;

  // Weight, bias and BN registers.
  logic [NWORDS*32-1:0]   wreg   [F];
  logic signed [SUM_W-1:0] bias  [F];
  logic signed [BN_W-1:0]  bn_mul[F];
  logic signed [BN_W-1:0]  bn_add[F];

  always_ff @(posedge clk) begin
    if (cfg.en && cfg.row < 16'(F)) begin
      if (cfg.target == 4'(T_BASE + T_W) && cfg.col < 16'(NWORDS))
        wreg[FW'(cfg.row)][WW'(cfg.col)*32 +: 32] <= cfg.data;
      if (cfg.target == 4'(T_BASE + T_B))
        bias[FW'(cfg.row)] <= cfg.data[SUM_W-1:0];
      if (cfg.target == 4'(T_BASE + T_BN)) begin
        bn_mul[FW'(cfg.row)] <= cfg.data[31:16];
        bn_add[FW'(cfg.row)] <= cfg.data[15:0];
      end
    end
  end

  // Context generator.
  logic         win_valid;
  logic [N-1:0] win;
  context_gen #(.IMG_W(IMG_W), .IMG_H(IMG_H), .K(K), .C(C_IN)) u_ctx (
    .clk, .rst_n, .pix_valid, .pix, .win_valid, .win
  );

  // XNOR + Acc, one per filter.
  logic                    sum_valid [F];
  logic signed [SUM_W-1:0] sum       [F];
  for (genvar f = 0; f < F; f++) begin : g_filter
    xnor_acc #(.N(N)) u_xacc (
      .clk, .rst_n,
      .in_valid (win_valid),
      .x        (win),
      .w        (wreg[f][N-1:0]),
      .bias     (bias[f]),
      .out_valid(sum_valid[f]),
      .y        (sum[f])
    );
  end

  // Max filter.
  logic                    pool_valid;
  logic signed [SUM_W-1:0] pooled [F];
  max_filter #(.LANES(F), .IN_W(OW), .IN_H(OH)) u_max (
    .clk, .rst_n,
    .in_valid (sum_valid[0]),
    .x        (sum),
    .out_valid(pool_valid),
    .y        (pooled)
  );

  // Point processing elements.
  logic                    act_valid [F];
  logic signed [VAL_W-1:0] act_val   [F];
  for (genvar f = 0; f < F; f++) begin : g_ppe
    ppe u_ppe (
      .clk, .rst_n,
      .in_valid (pool_valid),
      .x        (pooled[f]),
      .bn_mul   (bn_mul[f]),
      .bn_add   (bn_add[f]),
      .out_valid(act_valid[f]),
      .val      (act_val[f]),
      .bit_out  (out[f])
    );
  end
  assign out_valid = act_valid[0];
endmodule
