// pot_linear_layer: a quantised layer built from N_PE PoT processing elements
// that share one stream of INT8 input activations, followed by the ReQ unit.
//
// Weights, biases and FP32 scaling factors are first written into the layer's
// memories: weight word i holds the 4-bit codes of all PEs for input i (PE p
// in bits 4p+3:4p). start presets every accumulator with its bias. Then
// N_IN activations arrive on a_valid/a, at most one per cycle and in input
// order; for each one the weight word is read (one cycle, synchronous RAM)
// and every PE accumulates its shifted activation. After the N_IN-th
// activation the accumulators go through ReQ and q_valid pulses with one
// INT8 result per PE, three cycles after the last activation. busy is high
// from start to q_valid; activations outside that window are ignored.
//
// PEs sharing the activation, weights and biases loaded from memory, INT32
// partial sums and per-output FP scaling follow the published layer diagram.
// Memory organisation, the start/valid protocol and the sizes are this
// design's choices.
module pot_linear_layer
  import pot_pkg::*;
#(
  parameter int unsigned N_PE = 8,
  parameter int unsigned N_IN = 64,
  localparam int unsigned IW  = (N_IN > 1) ? $clog2(N_IN) : 1,
  localparam int unsigned PW  = (N_PE > 1) ? $clog2(N_PE) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  // memory loading
  input  logic                wmem_we,
  input  logic [IW-1:0]       wmem_addr,
  input  logic [N_PE*W_W-1:0] wmem_data,
  input  logic                bias_we,
  input  logic [PW-1:0]       bias_idx,
  input  acc_t                bias_data,
  input  logic                scale_we,
  input  logic [PW-1:0]       scale_idx,
  input  fp32_t               scale_data,
  // processing
  input  logic                start,
  input  logic                a_valid,
  input  act_t                a,
  output logic                busy,
  output logic                q_valid,
  output act_t                q [N_PE]
);
  logic [N_PE*W_W-1:0] wmem [N_IN];
  acc_t                bias_mem  [N_PE];
  fp32_t               scale_mem [N_PE];

  always_ff @(posedge clk) begin
    if (wmem_we)  wmem[wmem_addr]      <= wmem_data;
    if (bias_we)  bias_mem[bias_idx]   <= bias_data;
    if (scale_we) scale_mem[scale_idx] <= scale_data;
  end

  // Stage 1: count inputs, read the weight word, register the activation.
  logic [IW-1:0]       cnt;
  logic                s1_valid, s1_last;
  act_t                s1_a;
  logic [N_PE*W_W-1:0] s1_w;
  logic                s2_last;
  logic                s2_last_pending;  // last input taken, result not out yet
  logic                accepting;

  assign accepting = busy && a_valid && !s2_last_pending;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy            <= 1'b0;
      cnt             <= '0;
      s1_valid        <= 1'b0;
      s1_last         <= 1'b0;
      s1_a            <= '0;
      s2_last         <= 1'b0;
      s2_last_pending <= 1'b0;
    end else begin
      s1_valid <= accepting;
      s1_last  <= accepting && (cnt == IW'(N_IN - 1));
      s2_last  <= s1_last;
      if (accepting) s1_a <= a;
      if (start) begin
        busy            <= 1'b1;
        cnt             <= '0;
        s2_last_pending <= 1'b0;
      end else begin
        if (accepting) begin
          cnt <= cnt + 1'b1;
          if (cnt == IW'(N_IN - 1)) s2_last_pending <= 1'b1;
        end
        if (q_valid) begin
          busy            <= 1'b0;
          s2_last_pending <= 1'b0;
        end
      end
    end
  end

  always_ff @(posedge clk)
    if (accepting) s1_w <= wmem[cnt];

  // Stage 2: the processing elements.
  acc_t acc [N_PE];
  for (genvar p = 0; p < N_PE; p++) begin : g_pe
    potq_pe u_pe (
      .clk      (clk),
      .rst_n    (rst_n),
      .load_bias(start),
      .bias     (bias_mem[p]),
      .en       (s1_valid),
      .w        (s1_w[p*W_W +: W_W]),
      .a        (s1_a),
      .acc      (acc[p])
    );
  end

  // Stage 3: requantisation.
  requant #(.LANES(N_PE)) u_req (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (s2_last),
    .acc      (acc),
    .scale    (scale_mem),
    .out_valid(q_valid),
    .q        (q)
  );

  // A new vector may only start once the previous one has left the PEs.
  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) start |-> !s1_valid)
    else $error("start while the previous vector is still in the pipeline");
endmodule
