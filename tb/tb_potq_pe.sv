// tb_potq_pe: self-checking test of the PoT bitshift-and-accumulate element.
// Loads a random bias, accumulates random activations with random weight
// codes (all sixteen codes, including both zero-weight codes and the largest
// shift) and compares the accumulator each cycle with a reference that
// multiplies by the weight's value. Also checks reset and the one-cycle
// accumulate latency.
module tb_potq_pe;
  import pot_pkg::*;
  logic   clk = 0, rst_n = 0;
  logic   load_bias = 0, en = 0;
  acc_t   bias = '0, acc;
  wcode_t w = '0;
  act_t   a = '0;
  int     checks = 0, failures = 0;
  longint ref_acc;

  potq_pe dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what);
    checks++;
    if (acc !== acc_t'(ref_acc)) begin
      failures++;
      $display("FAIL %s: acc=%0d expected %0d", what, acc, acc_t'(ref_acc));
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 check("reset");  ref_acc = 0;
    rst_n = 1;
    for (int v = 0; v < 200; v++) begin
      @(negedge clk);
      load_bias = 1; bias = acc_t'($urandom_range(0, 200000)) - 100000; en = 0;
      @(negedge clk);
      load_bias = 0;
      ref_acc = bias;
      check("bias load");
      for (int i = 0; i < 40; i++) begin
        en = ($urandom_range(0, 3) != 0);
        w  = wcode_t'((v < 16 && i == 0) ? v : $urandom_range(0, 15));
        a  = act_t'($urandom_range(0, 255));
        @(negedge clk);
        if (en) ref_acc = longint'(acc_t'(ref_acc + longint'(pot_value(w)) * longint'(a)));
        check("accumulate");
      end
      en = 0;
    end
    // Extremes: -128 times -2^7, repeated.
    @(negedge clk); load_bias = 1; bias = '0; @(negedge clk); load_bias = 0; ref_acc = 0;
    en = 1; w = 4'b1111; a = -128;
    repeat (10) begin @(negedge clk); ref_acc += 16384; check("extreme"); end
    en = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
