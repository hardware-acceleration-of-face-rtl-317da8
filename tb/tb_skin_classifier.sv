// tb_skin_classifier: random colours, colours sampled near typical skin
// tones, and a sweep across threshold edges, compared one cycle later with
// a reference that evaluates the same rules with real-valued hue and
// saturation; the number of pixels classed as skin and as not skin must
// both be nonzero.
module tb_skin_classifier;
  import vision_pkg::*;
  localparam int W = 1, H = 1;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, n_skin = 0;
  logic in_valid = 0, out_valid, out_skin;
  rgb_t in_rgb = '0;
  skin_classifier dut (.*);
  `include "vision_tb_model.svh"

  initial begin
    bit e;
    repeat (3) @(posedge clk); rst_n <= 1;
    for (int i = 0; i < 30000; i++) begin
      @(negedge clk);
      if (i % 3 == 0) in_rgb = rgb_t'($urandom);
      else if (i % 3 == 1) begin
        in_rgb.r = 8'($urandom_range(120, 255));
        in_rgb.g = 8'($urandom_range(60, 200));
        in_rgb.b = 8'($urandom_range(30, 170));
      end else begin
        in_rgb.r = 8'(100 + (i / 3) % 150);
        in_rgb.g = 8'(40 + (i / 7) % 120);
        in_rgb.b = 8'(20 + (i / 11) % 100);
      end
      in_valid = (i % 5 != 4);
      e = skin_ref(in_rgb.r, in_rgb.g, in_rgb.b);
      @(negedge clk);
      checks++;
      if (out_valid != in_valid || (in_valid && out_skin != e)) begin
        failures++;
        if (failures < 10) $display("rgb %0d %0d %0d got %b exp %b", in_rgb.r, in_rgb.g, in_rgb.b, out_skin, e);
      end
      if (in_valid && e) n_skin++;
    end
    checks++;
    if (n_skin == 0 || n_skin == checks) begin failures++; $display("no variety: %0d skin", n_skin); end
    $display("skin pixels %0d of %0d", n_skin, checks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
