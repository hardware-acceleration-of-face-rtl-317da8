// tb_face_detect_top: the whole design end to end at reduced size (64 x 48
// frames, 16 PEs, smaller memories): two camera frames through the
// pre-processing chain, the accelerator running three layers on a
// candidate, and the detection drawn on the display stream. See
// top_tb_body.svh for the flow and the mechanisms counted.
module tb_face_detect_top;
  import dcnn_pkg::*;
  import vision_pkg::*;
  localparam int W = 64, H = 48, MIN_AREA = 40, N_PE = 16, N_FRAMES = 2;
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

  face_detect_top #(.IMG_W(W), .IMG_H(H), .MAX_LABELS(32), .MIN_AREA(MIN_AREA), .N_PE(N_PE),
                    .KDEPTH(256), .FDEPTH(256)) dut (.*);
  ddr_model #(.DEPTH(131072)) u_ddr (.clk, .rst_n, .ar_valid(ddr_ar_valid), .ar_ready(ddr_ar_ready),
    .ar_addr(ddr_ar_addr), .ar_len(ddr_ar_len), .r_valid(ddr_r_valid), .r_ready(ddr_r_ready),
    .r_data(ddr_r_data), .r_last(ddr_r_last));

  `include "top_tb_body.svh"

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
