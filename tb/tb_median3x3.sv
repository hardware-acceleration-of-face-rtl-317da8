// tb_median3x3: three random binary frames of different densities, streamed
// with random gaps and the minimum blanking the filter needs; every output
// pixel is compared with a majority-of-nine reference with zero border, and
// each frame must yield exactly W*H pixels.
module tb_median3x3;
  import vision_pkg::*;
  localparam int W = 13, H = 9;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic in_valid = 0, in_pix = 0, out_valid, out_pix, d_valid = 0, d_pix = 0;
  median3x3 #(.W(W), .H(H)) dut (.*);
  `include "vision_tb_model.svh"
  `include "bin_filter_tb.svh"
  initial run_filter_test(0);
endmodule
