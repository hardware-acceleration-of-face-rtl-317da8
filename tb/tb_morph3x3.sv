// tb_morph3x3: erosion and dilation instances, each fed three random
// binary frames with random gaps and minimum blanking; every output pixel
// is compared with a reference (all nine / any of nine, zero border), and
// each frame must yield exactly W*H pixels.
module tb_morph3x3;
  import vision_pkg::*;
  localparam int W = 11, H = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic in_valid = 0, in_pix = 0, out_valid, out_pix, d_valid, d_pix;
  morph3x3 #(.W(W), .H(H), .DILATE(1'b0)) dut (.*);
  morph3x3 #(.W(W), .H(H), .DILATE(1'b1)) dut_d (.clk, .rst_n, .in_valid, .in_pix,
                                                  .out_valid(d_valid), .out_pix(d_pix));
  `include "vision_tb_model.svh"
  `include "bin_filter_tb.svh"
  initial run_filter_test(1);
endmodule
