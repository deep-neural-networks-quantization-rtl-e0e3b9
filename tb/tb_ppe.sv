// tb_ppe: self-checking test of batch norm plus sign activation. Random
// sums and BN parameters, plus directed cases where the BN result is exactly
// 0 (activation +1) and -1 (activation -1); val and the bit are checked one
// cycle after in_valid.
module tb_ppe;
  import xnor_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid, bit_out;
  logic signed [SUM_W-1:0] x = '0;
  logic signed [BN_W-1:0] bn_mul = '0, bn_add = '0;
  logic signed [VAL_W-1:0] val;
  int checks = 0, failures = 0;

  ppe dut (.*);
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
      int e;
      @(negedge clk);
      x      = SUM_W'($signed($urandom_range(0, 400)) - 200);
      bn_mul = BN_W'($signed($urandom_range(0, 60)) - 30);
      bn_add = BN_W'($signed($urandom_range(0, 4000)) - 2000);
      if (n % 10 == 0) begin bn_mul = 3; x = SUM_W'(n % 50); bn_add = -BN_W'(3 * (n % 50)); end
      if (n % 10 == 5) begin bn_mul = 1; x = 7; bn_add = -8; end
      e = int'(x) * int'(bn_mul) + int'(bn_add);
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid || int'(val) != e || bit_out != (e >= 0)) begin
        failures++; $display("FAIL: x=%0d mul=%0d add=%0d val=%0d bit=%0d expected %0d", x, bn_mul, bn_add, val, bit_out, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
