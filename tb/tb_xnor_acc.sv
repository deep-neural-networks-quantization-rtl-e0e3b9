// tb_xnor_acc: self-checking test of the XNOR/popcount/bias unit with the
// default 75-bit window. Random and extreme (all agree, all differ) windows
// and biases; y must equal 2*matches - 75 + bias one cycle later.
module tb_xnor_acc;
  import xnor_pkg::*;
  localparam int N = 75;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic [N-1:0] x = '0, w = '0;
  logic signed [SUM_W-1:0] bias = '0, y;
  int checks = 0, failures = 0;

  xnor_acc #(.N(N)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      int m, e;
      @(negedge clk);
      for (int i = 0; i < N; i++) begin x[i] = 1'($urandom); w[i] = 1'($urandom); end
      if (n == 0) w = x;
      if (n == 1) w = ~x;
      bias = SUM_W'($signed($urandom_range(0, 200)) - 100);
      m = 0;
      for (int i = 0; i < N; i++) if (x[i] == w[i]) m++;
      e = 2 * m - N + int'(bias);
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid || int'(y) != e) begin
        failures++; $display("FAIL: y=%0d valid=%0d expected %0d", y, out_valid, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
