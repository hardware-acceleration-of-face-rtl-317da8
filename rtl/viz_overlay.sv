// viz_overlay: the visualisation module, which marks detected faces on the
// outgoing video.
//
// The processing system writes the boxes of candidates its classifier
// accepted into N_DET slots (det_we, det_idx, det_set = 1 with det_box to
// fill a slot, det_set = 0 to empty it). The video stream passes through
// with one cycle of delay; a pixel lying on the border of any occupied
// slot's box is replaced by COLOR. The module counts pixels itself (W x H,
// raster order, counting only cycles with in_valid).
//
// Sending face coordinates to a visualisation module that feeds the display
// follows the reference design; the number of slots, drawing the box
// outline and its colour are this design's choices.
module viz_overlay
  import vision_pkg::*;
#(
  parameter int           W     = 3840,
  parameter int           H     = 2160,
  parameter int           N_DET = 8,
  parameter logic [23:0]  COLOR = 24'h00FF00
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     det_we,
  input  logic [$clog2(N_DET)-1:0] det_idx,
  input  logic                     det_set,
  input  bbox_t                    det_box,
  input  logic                     in_valid,
  input  rgb_t                     in_rgb,
  output logic                     out_valid,
  output rgb_t                     out_rgb
);

  bbox_t            boxes [N_DET];
  logic [N_DET-1:0] used;
  coord_t           x, y;

  logic on_edge;
  always_comb begin
    on_edge = 1'b0;
    for (int i = 0; i < N_DET; i++) begin
      if (used[i] &&
          (((x == boxes[i].x0 || x == boxes[i].x1) && y >= boxes[i].y0 && y <= boxes[i].y1) ||
           ((y == boxes[i].y0 || y == boxes[i].y1) && x >= boxes[i].x0 && x <= boxes[i].x1)))
        on_edge = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      used <= '0; x <= '0; y <= '0; out_valid <= 1'b0; out_rgb <= '0;
      for (int i = 0; i < N_DET; i++) boxes[i] <= '0;
    end else begin
      if (det_we) begin
        used[det_idx]  <= det_set;
        boxes[det_idx] <= det_box;
      end
      out_valid <= in_valid;
      if (in_valid) begin
        out_rgb <= on_edge ? rgb_t'(COLOR) : in_rgb;
        if (int'(x) == W - 1) begin
          x <= '0;
          y <= (int'(y) == H - 1) ? '0 : y + 1'b1;
        end else x <= x + 1'b1;
      end
    end
  end

endmodule
