// tb_fm_reader: self-checking test of the input data controller with a
// 25-word map. After each start the read addresses must run 0..24 on
// consecutive cycles, out_valid must follow re by one cycle, done must pulse
// once with the last word, and a restart while busy must begin again at 0.
module tb_fm_reader;
  localparam int D = 25;
  logic clk = 0, rst_n = 0, start = 0, re, out_valid, done, busy;
  logic [4:0] raddr;
  int checks = 0, failures = 0;

  fm_reader #(.DEPTH(D)) dut (.*);
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
    for (int run = 0; run < 6; run++) begin
      int stop_at, ndone;
      logic re_q;
      stop_at = (run == 2) ? 10 : D;   // run 2 is restarted after 10 words
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      ndone = 0;
      for (int i = 0; i < stop_at; i++) begin
        checks++;
        if (!re || raddr != 5'(i)) begin failures++; $display("FAIL run %0d: re=%0d raddr=%0d expected %0d", run, re, raddr, i); end
        if (done) ndone++;
        re_q = re;
        @(negedge clk);
        checks++;
        if (out_valid != re_q) begin failures++; $display("FAIL: out_valid does not follow re"); end
      end
      if (done) ndone++;
      checks++;
      if (run != 2 && (ndone != 1 || re || busy)) begin failures++; $display("FAIL run %0d: done count %0d, re %0d", run, ndone, re); end
      repeat ($urandom_range(0, 5)) begin
        @(negedge clk);
        checks++;
        if (run != 2 && (re || done)) begin failures++; $display("FAIL: activity after done"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
