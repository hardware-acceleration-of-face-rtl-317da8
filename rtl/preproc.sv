// preproc: the skin-region pre-processing chain on the camera stream.
//
// skin_classifier -> median3x3 -> morph3x3 (erosion) -> morph3x3 (dilation)
// -> ccl_bbox. The camera's RGB pixels (raster order, one per cycle when
// cam_valid) become a binary skin map, are cleaned of noise by the median
// filter and the opening, and are labelled into connected regions. After
// each frame the bounding boxes of regions large enough to hold a face come
// out on cand_valid/cand_box, one per cycle, for the processing system,
// followed by frame_done.
//
// Each window filter delays the stream by one row and two pixels and adds
// zero padding pixels of its own at line ends and after the frame, so the
// source must leave at least one idle cycle after each line and at least
// 3*(W+2) + MAX_LABELS + 2 idle cycles after each frame (standard video
// blanking is far longer). The chain of stages follows the reference
// design; the order of erosion and dilation and all sizes are this design's
// choices.
module preproc
  import vision_pkg::*;
#(
  parameter int W          = 3840,
  parameter int H          = 2160,
  parameter int MAX_LABELS = 256,
  parameter int MIN_AREA   = 400
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  cam_valid,
  input  rgb_t  cam_rgb,
  output logic  cand_valid,
  output bbox_t cand_box,
  output logic  frame_done,
  output logic  overflow
);

  logic s_v, s_p, m_v, m_p, e_v, e_p, d_v, d_p;

  skin_classifier u_skin (
    .clk, .rst_n, .in_valid(cam_valid), .in_rgb(cam_rgb), .out_valid(s_v), .out_skin(s_p)
  );

  median3x3 #(.W(W), .H(H)) u_median (
    .clk, .rst_n, .in_valid(s_v), .in_pix(s_p), .out_valid(m_v), .out_pix(m_p)
  );

  morph3x3 #(.W(W), .H(H), .DILATE(1'b0)) u_erode (
    .clk, .rst_n, .in_valid(m_v), .in_pix(m_p), .out_valid(e_v), .out_pix(e_p)
  );

  morph3x3 #(.W(W), .H(H), .DILATE(1'b1)) u_dilate (
    .clk, .rst_n, .in_valid(e_v), .in_pix(e_p), .out_valid(d_v), .out_pix(d_p)
  );

  ccl_bbox #(.W(W), .H(H), .MAX_LABELS(MAX_LABELS), .MIN_AREA(MIN_AREA)) u_ccl (
    .clk, .rst_n, .in_valid(d_v), .in_pix(d_p),
    .cand_valid, .cand_box, .frame_done, .overflow
  );

endmodule
