// fm_writer: output data controller.
//
// Writes each valid output pixel of a block into the next feature-map BRAM at
// consecutive addresses, starting from 0 after start (or reset). The write
// is combinational (we = in_valid), so the BRAM stores the pixel at the same
// clock edge. we and wdata are therefore the block's in_valid and in_data
// passed straight through: the controller's own work is the address counter
// and the end-of-map pulse, and registering the data would only add a cycle
// of latency to every layer. done pulses in the cycle after the DEPTH-th
// pixel is written, and the address returns to 0 for the next frame.
//
// The controller's role comes from the published block diagram; the
// addressing is this design's choice.
module fm_writer #(
  parameter int unsigned DEPTH = 196,
  parameter int unsigned WIDTH = 6,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic             in_valid,
  input  logic [WIDTH-1:0] in_data,
  output logic             we,
  output logic [AW-1:0]    waddr,
  output logic [WIDTH-1:0] wdata,
  output logic             done
);
  assign we    = in_valid;
  assign wdata = in_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      waddr <= '0;
      done  <= 1'b0;
    end else begin
      done <= in_valid && (waddr == AW'(DEPTH - 1));
      if (start)
        waddr <= '0;
      else if (in_valid)
        waddr <= (waddr == AW'(DEPTH - 1)) ? '0 : waddr + 1'b1;
    end
  end
endmodule
