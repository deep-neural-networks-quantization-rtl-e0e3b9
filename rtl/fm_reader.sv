// fm_reader: input data controller (and FC input controller).
//
// After a start pulse it reads addresses 0 .. DEPTH-1 of a feature-map BRAM,
// one per cycle, and raises out_valid in the cycle the BRAM's registered
// output holds each word, so the stream can be fed straight into a
// convolution or dense block. done pulses with the last word; busy is high
// from start until then. A start while busy restarts from address 0.
//
// The controller's role comes from the published block diagram; raster
// order and the one-word-per-cycle rate are this design's choices.
module fm_reader #(
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          re,
  output logic [AW-1:0] raddr,
  output logic          out_valid,
  output logic          done,
  output logic          busy
);
  logic last_rd;

  assign re      = busy;
  assign last_rd = busy && (raddr == AW'(DEPTH - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      raddr     <= '0;
      out_valid <= 1'b0;
      done      <= 1'b0;
    end else begin
      out_valid <= re;
      done      <= last_rd && !start;
      if (start) begin
        busy  <= 1'b1;
        raddr <= '0;
      end else if (busy) begin
        raddr <= last_rd ? '0 : raddr + 1'b1;
        if (last_rd) busy <= 1'b0;
      end
    end
  end
endmodule
