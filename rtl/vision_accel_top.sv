// vision_accel_top: the two accelerators of this design side by side.
//
//  * pot_*: a power-of-two quantised layer (INT4 PoT weights, INT8
//    activations, INT32 sums, FP32 per-output scaling), built from
//    bitshift-and-accumulate processing elements and a requantisation unit.
//  * xn_*:  a binary XNOR CNN classifier for 32x32 images with
//    convolution blocks, feature-map BRAMs and dense blocks.
//
// They share only clock and reset; see pot_linear_layer and xnor_accelerator
// for the protocols and timing of each port group.
module vision_accel_top
  import pot_pkg::*;
  import xnor_pkg::*;
#(
  parameter int unsigned POT_N_PE = 8,
  parameter int unsigned POT_N_IN = 64,
  localparam int unsigned PIW     = (POT_N_IN > 1) ? $clog2(POT_N_IN) : 1,
  localparam int unsigned PPW     = (POT_N_PE > 1) ? $clog2(POT_N_PE) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // PoT layer
  input  logic                    pot_wmem_we,
  input  logic [PIW-1:0]          pot_wmem_addr,
  input  logic [POT_N_PE*W_W-1:0] pot_wmem_data,
  input  logic                    pot_bias_we,
  input  logic [PPW-1:0]          pot_bias_idx,
  input  acc_t                    pot_bias_data,
  input  logic                    pot_scale_we,
  input  logic [PPW-1:0]          pot_scale_idx,
  input  fp32_t                   pot_scale_data,
  input  logic                    pot_start,
  input  logic                    pot_a_valid,
  input  act_t                    pot_a,
  output logic                    pot_busy,
  output logic                    pot_q_valid,
  output act_t                    pot_q [POT_N_PE],
  // XNOR accelerator
  input  cfg_t                    xn_cfg,
  input  logic                    xn_in_we,
  input  logic [9:0]              xn_in_addr,
  input  logic [C0-1:0]           xn_in_data,
  input  logic                    xn_start,
  output logic                    xn_ready,
  output logic                    xn_in_ready,
  output logic                    xn_busy,
  output logic                    xn_score_valid,
  output logic [5:0]              xn_score_idx,
  output logic signed [VAL_W-1:0] xn_score,
  output logic                    xn_done
);
  pot_linear_layer #(.N_PE(POT_N_PE), .N_IN(POT_N_IN)) u_pot (
    .clk, .rst_n,
    .wmem_we(pot_wmem_we), .wmem_addr(pot_wmem_addr), .wmem_data(pot_wmem_data),
    .bias_we(pot_bias_we), .bias_idx(pot_bias_idx), .bias_data(pot_bias_data),
    .scale_we(pot_scale_we), .scale_idx(pot_scale_idx), .scale_data(pot_scale_data),
    .start(pot_start), .a_valid(pot_a_valid), .a(pot_a),
    .busy(pot_busy), .q_valid(pot_q_valid), .q(pot_q)
  );

  xnor_accelerator u_xnor (
    .clk, .rst_n, .cfg(xn_cfg),
    .in_we(xn_in_we), .in_addr(xn_in_addr), .in_data(xn_in_data),
    .start(xn_start), .ready(xn_ready), .in_ready(xn_in_ready), .busy(xn_busy),
    .score_valid(xn_score_valid), .score_idx(xn_score_idx), .score(xn_score),
    .done(xn_done)
  );
endmodule
