// tb_pot_resnet_conv: runs whole 3x3 convolution layers of the ResNet
// networks used to evaluate 4-bit PoT weights through the PoT layer, and
// checks every output against a reference convolution.
//
// Two layers run side by side, each on its own PoT layer instance (see
// pot_conv_runner for the stimulus and the reference):
//   * ResNet20 / CIFAR, first stage: 16 -> 16 channels on a 32x32 map.
//     16 PEs with 144 inputs each compute all 16 output channels at once.
//   * ResNet18 / ImageNet, conv2_x (also the 3x3 layer of a ResNet50
//     bottleneck): 64 -> 64 channels on a 56x56 map. 8 PEs with 576 inputs
//     each compute one 8-channel slice. The other seven slices are the same
//     computation with other weights.
// The layer shapes are the standard ResNet ones. The PE counts and the
// slicing are this testbench's choice. The run is about 1.8 million
// cycles, and the watchdog allows 2.5 million.
module tb_pot_resnet_conv;
  logic clk = 0, rst_n = 0;
  int   c20, f20, c18, f18;
  logic d20, d18;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  pot_conv_runner #(.NAME("resnet20 stage1"), .C(16), .H(32), .W(32), .N_PE(16))
    u_r20 (.clk, .rst_n, .checks(c20), .failures(f20), .finished(d20));

  pot_conv_runner #(.NAME("resnet18 conv2_x slice"), .C(64), .H(56), .W(56), .N_PE(8))
    u_r18 (.clk, .rst_n, .checks(c18), .failures(f18), .finished(d18));

  initial begin
    repeat (2500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + c20 + c18, failures + f20 + f18);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (d20 && d18);
    checks = c20 + c18;
    failures = f20 + f18;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
