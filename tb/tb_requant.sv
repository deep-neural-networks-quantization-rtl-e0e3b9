// tb_requant: self-checking test of the requantisation unit.
// Random INT32 accumulators (up to 2^28) times random FP32 scales (2^-14 ..
// 2^1, both signs) are compared with a double-precision reference (exact for
// these ranges) rounded half away from zero and clamped to INT8. Directed
// cases cover exact ties, zero scale, zero accumulator, saturation at both
// ends and the one-cycle latency.
module tb_requant;
  import pot_pkg::*;
  localparam int L = 4;
  logic  clk = 0, rst_n = 0, in_valid = 0, out_valid;
  acc_t  acc   [L];
  fp32_t scale [L];
  act_t  q     [L];
  int    checks = 0, failures = 0;
  int    sat_hi = 0, sat_lo = 0;

  requant #(.LANES(L)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_q(input acc_t x, input fp32_t s);
    real y, m;
    longint r;
    if (s[30:23] == 0) return 0;
    // value of the FP32 word: (-1)^s * 1.f * 2^(e-127)
    y = real'(x) * real'({1'b1, s[22:0]}) * (2.0 ** (real'(int'(s[30:23])) - 150.0));
    if (s[31]) y = -y;
    m = (y < 0) ? -y : y;
    r = longint'($floor(m + 0.5));
    if (y < 0) r = -r;
    if (r > 127) return 127;
    if (r < -128) return -128;
    return int'(r);
  endfunction

  function automatic fp32_t rnd_scale();
    fp32_t s;
    s[31]    = $urandom_range(0, 1);
    s[30:23] = 8'($urandom_range(127 - 14, 127 + 1));
    s[22:0]  = 23'($urandom);
    return s;
  endfunction

  task automatic run_and_check(input acc_t xs[L], input fp32_t ss[L]);
    int e [L];
    @(negedge clk);
    for (int i = 0; i < L; i++) begin acc[i] = xs[i]; scale[i] = ss[i]; e[i] = ref_q(xs[i], ss[i]); end
    in_valid = 1;
    @(negedge clk);
    in_valid = 0;
    checks++;
    if (!out_valid) begin failures++; $display("FAIL: out_valid not one cycle after in_valid"); end
    for (int i = 0; i < L; i++) begin
      checks++;
      if (int'(q[i]) != e[i]) begin
        failures++;
        $display("FAIL: acc=%0d scale=%h q=%0d expected %0d", xs[i], ss[i], q[i], e[i]);
      end
      if (e[i] == 127) sat_hi++;
      if (e[i] == -128) sat_lo++;
    end
    @(negedge clk);
    checks++;
    if (out_valid) begin failures++; $display("FAIL: out_valid longer than one cycle"); end
  endtask

  initial begin
    acc_t  xs [L];
    fp32_t ss [L];
    for (int i = 0; i < L; i++) begin acc[i] = '0; scale[i] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    // Ties: 3 * 0.5 = 1.5 -> 2, -3 * 0.5 -> -2, 5 * 0.5 = 2.5 -> 3, 1 * 0.25 -> 0
    xs = '{3, -3, 5, 1};
    ss = '{32'h3F000000, 32'h3F000000, 32'h3F000000, 32'h3E800000};
    run_and_check(xs, ss);
    // zero scale, zero acc, saturation both ways
    xs = '{1000, 0, 1000, -1000};
    ss = '{32'h00000000, 32'h3F800000, 32'h3F800000, 32'h3F800000};
    run_and_check(xs, ss);
    for (int n = 0; n < 3000; n++) begin
      for (int i = 0; i < L; i++) begin
        xs[i] = acc_t'($signed($urandom_range(0, 1 << 20)) - (1 << 19));
        if (n % 7 == 0) xs[i] = acc_t'($signed($urandom) >>> 4);
        ss[i] = rnd_scale();
      end
      run_and_check(xs, ss);
    end
    checks++;
    if (sat_hi == 0 || sat_lo == 0) begin failures++; $display("FAIL: saturation not exercised"); end
    $display("saturations: high %0d low %0d", sat_hi, sat_lo);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
