// fm_bram: simple dual-port block RAM for one layer's feature maps.
//
// One word per pixel, one bit per map (channel). Write port: we/waddr/wdata,
// written at the clock edge. Read port: rdata holds mem[raddr] from the cycle
// after re. Reading and writing the same address in one cycle returns the
// old word. Contents are not reset.
//
// A dedicated BRAM per layer output follows the published architecture; the
// word layout is this design's choice.
module fm_bram #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned WIDTH = 3,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule
