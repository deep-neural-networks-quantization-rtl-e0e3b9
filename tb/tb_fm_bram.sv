// tb_fm_bram: self-checking test of the feature-map RAM: random writes, then
// reads checked one cycle after re, including a read of an address written
// in the same cycle (old data expected) and a hold of rdata while re is low.
module tb_fm_bram;
  localparam int D = 196, WD = 6;
  logic clk = 0, we = 0, re = 0;
  logic [7:0] waddr = '0, raddr = '0;
  logic [WD-1:0] wdata = '0, rdata;
  int checks = 0, failures = 0;
  logic [WD-1:0] model [D];

  fm_bram #(.DEPTH(D), .WIDTH(WD)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < D; i++) begin
      @(negedge clk); we = 1; waddr = 8'(i); wdata = WD'($urandom); model[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 2000; n++) begin
      int a;
      logic [WD-1:0] e;
      @(negedge clk);
      a = $urandom_range(0, D - 1);
      re = 1; raddr = 8'(a); e = model[a];
      we = ($urandom_range(0, 1) == 1);
      waddr = (n % 5 == 0) ? 8'(a) : 8'($urandom_range(0, D - 1));
      wdata = WD'($urandom);
      if (we) model[waddr] = wdata;
      @(negedge clk);
      re = 0; we = 0;
      checks++;
      if (rdata !== e) begin failures++; $display("FAIL: addr %0d rdata %h expected %h", a, rdata, e); end
      @(negedge clk);
      checks++;
      if (rdata !== e) begin failures++; $display("FAIL: rdata changed without re"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
