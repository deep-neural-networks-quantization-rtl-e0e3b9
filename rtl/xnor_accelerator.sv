// xnor_accelerator: binary (XNOR) CNN traffic-sign classifier.
//
// Data path: input BRAM (IMG x IMG pixels of C0 binary channels, written by
// the host) -> input data controller -> Convolutional Block 1 -> output data
// controller -> feature-map BRAM 1 -> input data controller -> Convolutional
// Block 2 -> output data controller -> feature-map BRAM 2 -> FC input
// controller -> Dense Blocks 1, 2, 3 -> class scores.
//
// Operation: write all weights, biases and BN parameters over cfg (see
// xnor_pkg, conv_block, dense_block) and the image with in_we/in_addr/in_data,
// then pulse start. Each layer streams one pixel per cycle through its block
// and its result is written to the layer's own BRAM; the next layer starts
// when that map is complete. The last dense block emits one class score per
// cycle (score_valid, score_idx, score = BN output of the class neuron);
// done pulses with the last score of each frame.
//
// Frames overlap layer-wise. in_ready says that the input BRAM may take a
// write to in_addr now: layer 1 is not reading, or it has already read that
// address (the RAM is read-first, so the address being read this cycle may
// be written too). A host can therefore write the next image in raster order
// right behind the reader, starting in the cycle after start. ready rises
// once layer 1 has written its whole map, so the next start is accepted
// while layers 2..5 still work on the previous frame; a start while ready is
// low is ignored.
// Later layers are shorter than layer 1, so they always finish a frame
// before the next one reaches them. busy is high while any frame is in
// flight. With the default sizes a frame takes 1518 cycles from start to
// done, and a new frame can start every 1031 cycles.
//
// The block chain, the BRAM after every convolution layer, the data
// controllers and the dense blocks with serializers follow the published
// accelerator diagram. Layer sizes (LeNet5-like), running layers one after
// the other, the binary input channels and the configuration bus are this
// design's choices.
module xnor_accelerator
  import xnor_pkg::*;
#(
  parameter int unsigned IMG_SZ  = IMG,
  parameter int unsigned C_IN    = C0,
  parameter int unsigned KA      = K1,
  parameter int unsigned FA      = F1,
  parameter int unsigned KB      = K2,
  parameter int unsigned FB      = F2,
  parameter int unsigned H1      = FC1_OUT,
  parameter int unsigned H2      = FC2_OUT,
  parameter int unsigned NCLS    = N_CLASS,
  localparam int unsigned P1     = (IMG_SZ - KA + 1) / 2,   // side after layer 1
  localparam int unsigned P2     = (P1 - KB + 1) / 2,       // side after layer 2
  localparam int unsigned D0     = IMG_SZ * IMG_SZ,
  localparam int unsigned D1     = P1 * P1,
  localparam int unsigned D2     = P2 * P2,
  localparam int unsigned A0     = $clog2(D0),
  localparam int unsigned CLW    = (NCLS > 1) ? $clog2(NCLS) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  cfg_t                    cfg,
  input  logic                    in_we,
  input  logic [A0-1:0]           in_addr,
  input  logic [C_IN-1:0]         in_data,
  input  logic                    start,
  output logic                    ready,
  output logic                    in_ready,
  output logic                    busy,
  output logic                    score_valid,
  output logic [CLW-1:0]          score_idx,
  output logic signed [VAL_W-1:0] score,
  output logic                    done
);
  localparam int unsigned A1 = (D1 > 1) ? $clog2(D1) : 1;
  localparam int unsigned A2 = (D2 > 1) ? $clog2(D2) : 1;

  logic go;   // accepted start
  logic l1_busy;
  assign ready = !l1_busy;
  assign go    = start && ready;

  // ---------------- layer 1 ----------------
  logic            r0_re, r0_valid, r0_done, r0_busy;
  logic [A0-1:0]   r0_addr;
  logic [C_IN-1:0] r0_data;

  fm_bram #(.DEPTH(D0), .WIDTH(C_IN)) u_bram_in (
    .clk, .we(in_we), .waddr(in_addr), .wdata(in_data),
    .re(r0_re), .raddr(r0_addr), .rdata(r0_data)
  );
  fm_reader #(.DEPTH(D0)) u_rd0 (
    .clk, .rst_n, .start(go), .re(r0_re), .raddr(r0_addr),
    .out_valid(r0_valid), .done(r0_done), .busy(r0_busy)
  );

  logic          cb1_valid;
  logic [FA-1:0] cb1_out;
  conv_block #(.IMG_W(IMG_SZ), .IMG_H(IMG_SZ), .C_IN(C_IN), .K(KA), .F(FA), .T_BASE(0)) u_cb1 (
    .clk, .rst_n, .cfg, .pix_valid(r0_valid), .pix(r0_data),
    .out_valid(cb1_valid), .out(cb1_out)
  );

  logic          w1_we, w1_done;
  logic [A1-1:0] w1_addr;
  logic [FA-1:0] w1_data;
  fm_writer #(.DEPTH(D1), .WIDTH(FA)) u_wr1 (
    .clk, .rst_n, .start(go), .in_valid(cb1_valid), .in_data(cb1_out),
    .we(w1_we), .waddr(w1_addr), .wdata(w1_data), .done(w1_done)
  );

  // ---------------- layer 2 ----------------
  logic          r1_re, r1_valid, r1_done, r1_busy;
  logic [A1-1:0] r1_addr;
  logic [FA-1:0] r1_data;

  fm_bram #(.DEPTH(D1), .WIDTH(FA)) u_bram1 (
    .clk, .we(w1_we), .waddr(w1_addr), .wdata(w1_data),
    .re(r1_re), .raddr(r1_addr), .rdata(r1_data)
  );
  fm_reader #(.DEPTH(D1)) u_rd1 (
    .clk, .rst_n, .start(w1_done), .re(r1_re), .raddr(r1_addr),
    .out_valid(r1_valid), .done(r1_done), .busy(r1_busy)
  );

  logic          cb2_valid;
  logic [FB-1:0] cb2_out;
  conv_block #(.IMG_W(P1), .IMG_H(P1), .C_IN(FA), .K(KB), .F(FB), .T_BASE(3)) u_cb2 (
    .clk, .rst_n, .cfg, .pix_valid(r1_valid), .pix(r1_data),
    .out_valid(cb2_valid), .out(cb2_out)
  );

  logic          w2_we, w2_done;
  logic [A2-1:0] w2_addr;
  logic [FB-1:0] w2_data;
  fm_writer #(.DEPTH(D2), .WIDTH(FB)) u_wr2 (
    .clk, .rst_n, .start(1'b0), .in_valid(cb2_valid), .in_data(cb2_out),
    .we(w2_we), .waddr(w2_addr), .wdata(w2_data), .done(w2_done)
  );

  // ---------------- dense layers ----------------
  logic          r2_re, r2_valid, r2_done, r2_busy;
  logic [A2-1:0] r2_addr;
  logic [FB-1:0] r2_data;

  fm_bram #(.DEPTH(D2), .WIDTH(FB)) u_bram2 (
    .clk, .we(w2_we), .waddr(w2_addr), .wdata(w2_data),
    .re(r2_re), .raddr(r2_addr), .rdata(r2_data)
  );
  fm_reader #(.DEPTH(D2)) u_rd_fc (
    .clk, .rst_n, .start(w2_done), .re(r2_re), .raddr(r2_addr),
    .out_valid(r2_valid), .done(r2_done), .busy(r2_busy)
  );

  localparam int unsigned H1W = (H1 > 1) ? $clog2(H1) : 1;
  localparam int unsigned H2W = (H2 > 1) ? $clog2(H2) : 1;
  logic                    d1_valid, d1_bit, d1_busy;
  logic [H1W-1:0]          d1_idx;
  logic signed [VAL_W-1:0] d1_val;
  dense_block #(.N_IN(D2 * FB), .IN_W(FB), .N_OUT(H1), .T_BASE(6)) u_db1 (
    .clk, .rst_n, .cfg, .in_valid(r2_valid), .in_bits(r2_data),
    .out_valid(d1_valid), .out_idx(d1_idx), .out_val(d1_val), .out_bit(d1_bit), .busy(d1_busy)
  );

  logic                    d2_valid, d2_bit, d2_busy;
  logic [H2W-1:0]          d2_idx;
  logic signed [VAL_W-1:0] d2_val;
  dense_block #(.N_IN(H1), .IN_W(1), .N_OUT(H2), .T_BASE(9)) u_db2 (
    .clk, .rst_n, .cfg, .in_valid(d1_valid), .in_bits(d1_bit),
    .out_valid(d2_valid), .out_idx(d2_idx), .out_val(d2_val), .out_bit(d2_bit), .busy(d2_busy)
  );

  logic d3_bit, d3_busy;
  dense_block #(.N_IN(H2), .IN_W(1), .N_OUT(NCLS), .T_BASE(12)) u_db3 (
    .clk, .rst_n, .cfg, .in_valid(d2_valid), .in_bits(d2_bit),
    .out_valid(score_valid), .out_idx(score_idx), .out_val(score), .out_bit(d3_bit), .busy(d3_busy)
  );

  assign in_ready = !r0_busy || (in_addr <= r0_addr);

  // Frames in flight: at most two (one in layer 1, one in layers 2..5).
  logic [1:0] in_flight;
  assign busy = (in_flight != 2'd0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      l1_busy   <= 1'b0;
      in_flight <= 2'd0;
      done      <= 1'b0;
    end else begin
      done <= score_valid && (score_idx == CLW'(NCLS - 1));
      if (go) l1_busy <= 1'b1;
      else if (w1_done) l1_busy <= 1'b0;
      in_flight <= in_flight + {1'b0, go} - {1'b0, done};
    end
  end

  a_start_ready: assert property (@(posedge clk) disable iff (!rst_n) start |-> ready)
    else $error("start while layer 1 is still busy: ignored");
  a_in_write: assert property (@(posedge clk) disable iff (!rst_n) in_we |-> in_ready)
    else $error("input BRAM written while layer 1 is reading it");
endmodule
