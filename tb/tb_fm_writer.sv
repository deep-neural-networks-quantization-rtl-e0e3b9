// tb_fm_writer: self-checking test of the output data controller with a
// 14-word map. Pixels with random gaps must be written at addresses 0..13
// with their data, and done must pulse in the cycle after the 14th write,
// over several frames.
module tb_fm_writer;
  localparam int D = 14, WD = 6;
  logic clk = 0, rst_n = 0, start = 0, in_valid = 0, we, done;
  logic [WD-1:0] in_data = '0, wdata;
  logic [3:0] waddr;
  int checks = 0, failures = 0;

  fm_writer #(.DEPTH(D), .WIDTH(WD)) dut (.*);
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
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    for (int fr = 0; fr < 5; fr++) begin
      for (int i = 0; i < D; i++) begin
        while ($urandom_range(0, 2) == 0) begin
          @(negedge clk);
          checks++;
          if (we || done) begin failures++; $display("FAIL: we/done without a pixel"); end
        end
        in_valid = 1; in_data = WD'($urandom);
        #1;
        checks++;
        if (!we || waddr != 4'(i) || wdata != in_data) begin
          failures++; $display("FAIL frame %0d: we=%0d waddr=%0d expected %0d", fr, we, waddr, i);
        end
        @(negedge clk);
        in_valid = 0;
        checks++;
        if (done != (i == D - 1)) begin failures++; $display("FAIL: done=%0d after pixel %0d", done, i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
