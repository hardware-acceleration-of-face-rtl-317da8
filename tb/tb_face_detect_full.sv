// tb_face_detect_full: the whole design at its default sizes (3840 x 2160
// frames, 384 PEs, 4096-word kernel and 1024-word feature-map memories):
// one 4K camera frame through the pre-processing chain with a detection box
// drawn on the display stream, then the accelerator runs three layers with
// all 384 filters on the first candidate. See top_tb_body.svh.
module tb_face_detect_full;
  import dcnn_pkg::*;
  import vision_pkg::*;
  localparam int W = 3840, H = 2160, MIN_AREA = 400, N_PE = 384, N_FRAMES = 1;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic cam_valid = 0; rgb_t cam_rgb = '0;
  logic cand_valid, cand_frame_done, cand_overflow; bbox_t cand_box;
  logic ps_req = 0, ps_ready, ps_we = 0, ps_rvalid, dcnn_irq;
  logic [23:0] ps_addr = 0; logic [31:0] ps_wdata = 0, ps_rdata;
  logic ddr_ar_valid, ddr_ar_ready, ddr_r_valid, ddr_r_ready, ddr_r_last;
  logic [31:0] ddr_ar_addr; logic [7:0] ddr_ar_len; logic [127:0] ddr_r_data;
  logic det_we = 0, det_set = 0; logic [2:0] det_idx = 0; bbox_t det_box = '0;
  logic disp_valid; rgb_t disp_rgb;

  face_detect_top dut (.*);
  ddr_model #(.DEPTH(262144)) u_ddr (.clk, .rst_n, .ar_valid(ddr_ar_valid), .ar_ready(ddr_ar_ready),
    .ar_addr(ddr_ar_addr), .ar_len(ddr_ar_len), .r_valid(ddr_r_valid), .r_ready(ddr_r_ready),
    .r_data(ddr_r_data), .r_last(ddr_r_last));

  // a detection box is already set when the frame starts (from an earlier frame)
  initial begin
    slot0 = '{x0: 12'd100, y0: 12'd200, x1: 12'd900, y1: 12'd1000};
    slot0_used = 1;
    @(posedge rst_n);
    @(negedge clk);
    det_we = 1; det_idx = '0; det_set = 1; det_box = slot0;
    @(negedge clk);
    det_we = 0;
  end

  `include "top_tb_body.svh"

  initial begin
    repeat (30000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
