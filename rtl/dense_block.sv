// dense_block: binary fully connected layer (Dense Block).
//
// The N_IN input bits arrive as N_IN/IN_W chunks of IN_W bits (in_valid), in
// order. For each chunk the block reads one word of its weight BRAM (the
// chunk's IN_W weight bits of every neuron) and every one of the N_OUT
// neurons adds popcount(XNOR(chunk, weights)) to its counter: the XNOR ACC
// works on all neurons in parallel. After the last chunk the Serializer
// walks the neurons, one per cycle, forming 2*count - N_IN + bias, and a
// single point processing element applies that neuron's batch norm and sign.
// out_valid/out_idx/out_val/out_bit carry neuron out_idx; the first neuron
// leaves 5 cycles after the last chunk and one follows per cycle. out_bit
// can feed the next dense block directly with IN_W = 1. busy is high while
// the serializer runs; a new frame must not start before it falls.
//
// Configuration (cfg_t, targets T_BASE + 0/1/2):
//   weights: row = chunk, col = neuron, data[IN_W-1:0] = weight bits;
//   bias:    row = neuron, data[15:0] signed;
//   BN:      row = neuron, data[31:16] multiplier, data[15:0] offset.
//
// XNOR ACC with a weight BRAM, a serializer and one PPE follow the published
// block diagram; chunking and all widths are this design's choices.
module dense_block
  import xnor_pkg::*;
#(
  parameter int unsigned N_IN   = 400,
  parameter int unsigned IN_W   = 16,
  parameter int unsigned N_OUT  = 120,
  parameter int unsigned T_BASE = 6,
  localparam int unsigned OW    = (N_OUT > 1) ? $clog2(N_OUT) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  cfg_t                    cfg,
  input  logic                    in_valid,
  input  logic [IN_W-1:0]         in_bits,
  output logic                    out_valid,
  output logic [OW-1:0]           out_idx,
  output logic signed [VAL_W-1:0] out_val,
  output logic                    out_bit,
  output logic                    busy
);
  localparam int unsigned NCH = N_IN / IN_W;
  localparam int unsigned CW  = (NCH > 1) ? $clog2(NCH) : 1;
  localparam int unsigned AW  = $clog2(N_IN + 1);

  // Weight BRAM, bias and BN registers.
  logic [IN_W-1:0]         wmem  [NCH][N_OUT];
  logic signed [SUM_W-1:0] bias  [N_OUT];
  logic signed [BN_W-1:0]  bn_mul[N_OUT];
  logic signed [BN_W-1:0]  bn_add[N_OUT];

  always_ff @(posedge clk) begin
    if (cfg.en) begin
      if (cfg.target == 4'(T_BASE + T_W) && cfg.row < 16'(NCH) && cfg.col < 16'(N_OUT))
        wmem[CW'(cfg.row)][OW'(cfg.col)] <= cfg.data[IN_W-1:0];
      if (cfg.row < 16'(N_OUT)) begin
        if (cfg.target == 4'(T_BASE + T_B))
          bias[OW'(cfg.row)] <= cfg.data[SUM_W-1:0];
        if (cfg.target == 4'(T_BASE + T_BN)) begin
          bn_mul[OW'(cfg.row)] <= cfg.data[31:16];
          bn_add[OW'(cfg.row)] <= cfg.data[15:0];
        end
      end
    end
  end

  // Stage 1: weight BRAM read.
  logic [CW-1:0]   ch;
  logic            s1_valid, s1_first, s1_last;
  logic [IN_W-1:0] s1_bits;
  logic [IN_W-1:0] s1_w [N_OUT];

  always_ff @(posedge clk)
    if (in_valid) begin
      s1_w    <= wmem[ch];
      s1_bits <= in_bits;
    end

  // Stage 2: XNOR ACC for all neurons.
  logic [AW-1:0] cnt [N_OUT];
  logic          acc_done;

  always_ff @(posedge clk)
    if (s1_valid)
      for (int n = 0; n < N_OUT; n++)
        cnt[n] <= (s1_first ? '0 : cnt[n]) + AW'($countones(~(s1_bits ^ s1_w[n])));

  // Serializer.
  logic                    ser_valid;
  logic [OW-1:0]           ser_idx, ser_idx_q;
  logic signed [SUM_W-1:0] ser_y;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ch        <= '0;
      s1_valid  <= 1'b0;
      s1_first  <= 1'b0;
      s1_last   <= 1'b0;
      acc_done  <= 1'b0;
      busy      <= 1'b0;
      ser_idx   <= '0;
      ser_valid <= 1'b0;
      ser_idx_q <= '0;
      ser_y     <= '0;
      out_idx   <= '0;
    end else begin
      s1_valid <= in_valid;
      s1_first <= in_valid && (ch == '0);
      s1_last  <= in_valid && (ch == CW'(NCH - 1));
      if (in_valid) ch <= (ch == CW'(NCH - 1)) ? '0 : ch + 1'b1;
      acc_done <= s1_valid && s1_last;

      if (acc_done) begin
        busy    <= 1'b1;
        ser_idx <= '0;
      end else if (busy) begin
        ser_idx <= ser_idx + 1'b1;
        if (ser_idx == OW'(N_OUT - 1)) busy <= 1'b0;
      end

      ser_valid <= busy;
      ser_idx_q <= ser_idx;
      if (busy) ser_y <= SUM_W'(bin_dot(32'(cnt[ser_idx]), N_IN)) + bias[ser_idx];
      if (ser_valid) out_idx <= ser_idx_q;
    end
  end

  ppe u_ppe (
    .clk, .rst_n,
    .in_valid (ser_valid),
    .x        (ser_y),
    .bn_mul   (bn_mul[ser_idx_q]),
    .bn_add   (bn_add[ser_idx_q]),
    .out_valid(out_valid),
    .val      (out_val),
    .bit_out  (out_bit)
  );

  // A new frame must not overwrite the counters while they are serialised.
  a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n) busy |-> !acc_done)
    else $error("dense block: next frame finished before the serializer");
endmodule
