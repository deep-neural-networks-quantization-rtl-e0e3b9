// potq_pe: power-of-two quantisation processing element, a bitshift-and-
// accumulate (BAC) unit that replaces the multiplier of a MAC.
//
// Each enabled cycle the INT8 activation is shifted left by the weight's shift
// field (bits 3:1), replaced by 0 when that field is 0 (the zero weight),
// negated when the sign bit (bit 0) is 1, and added to an INT32 accumulator.
// load_bias presets the accumulator with the INT32 bias, so one output is:
// load_bias once, then one en cycle per input. acc is the register itself, so
// a product shows in acc one cycle after its en cycle.
//
// The structure (shifter, zero multiplexer, sign unit and sign multiplexer,
// accumulator preset with the bias) follows the published schematic. The code
// layout with field 0 as the zero weight, the left shift and the reset
// behaviour are this design's choices.
module potq_pe
  import pot_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   load_bias,
  input  acc_t   bias,
  input  logic   en,
  input  wcode_t w,
  input  act_t   a,
  output acc_t   acc
);
  logic [W_W-2:0] shamt;
  logic           zero_weight;
  acc_t           shifted, magnitude, product;

  assign shamt       = w[W_W-1:1];
  assign zero_weight = (shamt == '0);

  always_comb begin
    shifted   = acc_t'(a) <<< shamt;
    magnitude = zero_weight ? '0 : shifted;
    product   = w[0] ? -magnitude : magnitude;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         acc <= '0;
    else if (load_bias) acc <= bias;
    else if (en)        acc <= acc + product;
  end
endmodule
