// tb_dense_block: self-checking test of a dense block on a reduced layer:
// 24 inputs in chunks of 4 bits, 5 neurons. Weights, biases and BN
// parameters are written over the configuration bus; four random input
// vectors are fed (with gaps between chunks), and the serialized outputs
// (index, BN value, activation bit) are compared with the reference model.
// The first neuron must leave 5 cycles after the last chunk and the rest
// on consecutive cycles.
module tb_dense_block;
  import xnor_pkg::*;
  import xnor_ref_pkg::*;
  localparam int NI = 24, IW = 4, NO = 5, NCH = NI / IW;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid, out_bit, busy;
  cfg_t cfg = '0;
  logic [IW-1:0] in_bits = '0;
  logic [2:0] out_idx;
  logic signed [VAL_W-1:0] out_val;
  int checks = 0, failures = 0;
  longint cyc = 0;

  dense_block #(.N_IN(NI), .IN_W(IW), .N_OUT(NO), .T_BASE(9)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cfg_write(input int target, input int row, input int col, input logic [31:0] data);
    @(negedge clk);
    cfg.en = 1; cfg.target = 4'(target); cfg.row = 16'(row); cfg.col = 16'(col); cfg.data = data;
    @(negedge clk);
    cfg.en = 0;
  endtask

  bit vin[], wts[], eout[];
  int bias[], mul[], add[], eval[];

  initial begin
    wts = new[NO * NI]; bias = new[NO]; mul = new[NO]; add = new[NO]; vin = new[NI];
    foreach (wts[i]) wts[i] = 1'($urandom);
    for (int o = 0; o < NO; o++) begin
      bias[o] = $urandom_range(0, 6) - 3;
      mul[o]  = $urandom_range(1, 5) * ((o % 2) ? -1 : 1);
      add[o]  = $urandom_range(0, 20) - 10;
      cfg_write(9 + T_B, o, 0, 32'(bias[o]));
      cfg_write(9 + T_BN, o, 0, {16'(mul[o]), 16'(add[o])});
      for (int ch = 0; ch < NCH; ch++) begin
        logic [31:0] d;
        d = '0;
        for (int j = 0; j < IW; j++) d[j] = wts[o * NI + ch * IW + j];
        cfg_write(9 + T_W, ch, o, d);
      end
    end
    cfg_write(6 + T_W, 0, 0, 32'hffffffff);  // other layer: ignored
    rst_n = 1;
    for (int v = 0; v < 4; v++) begin
      longint t_last;
      foreach (vin[i]) vin[i] = 1'($urandom);
      dense_layer(vin, NI, NO, wts, bias, mul, add, eval, eout);
      for (int ch = 0; ch < NCH; ch++) begin
        @(negedge clk);
        in_valid = 0;
        while ($urandom_range(0, 2) == 0) @(negedge clk);
        in_valid = 1;
        for (int j = 0; j < IW; j++) in_bits[j] = vin[ch * IW + j];
        t_last = cyc;
      end
      @(negedge clk);
      in_valid = 0;
      for (int o = 0; o < NO; o++) begin
        while (!out_valid) @(negedge clk);
        checks++;
        if (cyc - t_last != 5 + o) begin failures++; $display("FAIL: neuron %0d after %0d cycles", o, cyc - t_last); end
        checks++;
        if (int'(out_idx) != o || int'(out_val) != eval[o] || out_bit != eout[o]) begin
          failures++; $display("FAIL vec %0d: idx %0d val %0d bit %0d expected %0d %0d %0d", v, out_idx, out_val, out_bit, o, eval[o], eout[o]);
        end
        @(negedge clk);
      end
      checks++;
      if (out_valid || busy) begin failures++; $display("FAIL: extra output"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
