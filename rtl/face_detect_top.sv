// face_detect_top: programmable-logic part of a two-stage face detector.
//
// Stage one runs on every camera frame: preproc finds skin-coloured regions
// and, after each frame, hands their bounding boxes (face candidates) to the
// processing system (PS). Stage two runs per candidate: the PS scales the
// candidate area, writes it into the DCNN accelerator (dcnn_accel) and runs
// the network's convolutional and pooling layers there, with kernels
// fetched from DDR; it reads the last feature maps back, computes the fully
// connected layers itself and, for a face, writes the box into the
// visualisation overlay (viz_overlay), which draws it on the display
// stream. The camera stream is passed to the display through the overlay.
//
// The PS, the DDR controller and the camera are outside this module; their
// signals are ports. All ports are in one clock domain. The split between
// logic and PS follows the reference design; the port protocols are this
// design's own.
module face_detect_top
  import dcnn_pkg::*;
  import vision_pkg::*;
#(
  parameter int IMG_W      = 3840,
  parameter int IMG_H      = 2160,
  parameter int MAX_LABELS = 256,
  parameter int MIN_AREA   = 400,
  parameter int N_DET      = 8,
  parameter int N_PE       = 384,
  parameter int KDEPTH     = 4096,
  parameter int FDEPTH     = 1024
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // camera
  input  logic                     cam_valid,
  input  rgb_t                     cam_rgb,
  // face candidates to the PS
  output logic                     cand_valid,
  output bbox_t                    cand_box,
  output logic                     cand_frame_done,
  output logic                     cand_overflow,
  // PS bus of the DCNN accelerator
  input  logic                     ps_req,
  output logic                     ps_ready,
  input  logic                     ps_we,
  input  logic [23:0]              ps_addr,
  input  logic [31:0]              ps_wdata,
  output logic                     ps_rvalid,
  output logic [31:0]              ps_rdata,
  output logic                     dcnn_irq,
  // DDR read channel
  output logic                     ddr_ar_valid,
  input  logic                     ddr_ar_ready,
  output logic [31:0]              ddr_ar_addr,
  output logic [7:0]               ddr_ar_len,
  input  logic                     ddr_r_valid,
  output logic                     ddr_r_ready,
  input  logic [DDR_W-1:0]         ddr_r_data,
  input  logic                     ddr_r_last,
  // detections from the PS
  input  logic                     det_we,
  input  logic [$clog2(N_DET)-1:0] det_idx,
  input  logic                     det_set,
  input  bbox_t                    det_box,
  // display
  output logic                     disp_valid,
  output rgb_t                     disp_rgb
);

  preproc #(.W(IMG_W), .H(IMG_H), .MAX_LABELS(MAX_LABELS), .MIN_AREA(MIN_AREA)) u_preproc (
    .clk, .rst_n, .cam_valid, .cam_rgb,
    .cand_valid, .cand_box, .frame_done(cand_frame_done), .overflow(cand_overflow)
  );

  dcnn_accel #(.N_PE(N_PE), .KDEPTH(KDEPTH), .FDEPTH(FDEPTH)) u_dcnn (
    .clk, .rst_n,
    .ps_req, .ps_ready, .ps_we, .ps_addr, .ps_wdata, .ps_rvalid, .ps_rdata, .irq(dcnn_irq),
    .ddr_ar_valid, .ddr_ar_ready, .ddr_ar_addr, .ddr_ar_len,
    .ddr_r_valid, .ddr_r_ready, .ddr_r_data, .ddr_r_last
  );

  viz_overlay #(.W(IMG_W), .H(IMG_H), .N_DET(N_DET)) u_viz (
    .clk, .rst_n, .det_we, .det_idx, .det_set, .det_box,
    .in_valid(cam_valid), .in_rgb(cam_rgb), .out_valid(disp_valid), .out_rgb(disp_rgb)
  );

endmodule
