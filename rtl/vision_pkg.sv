// vision_pkg: types shared by the skin-colour pre-processing pipeline and
// the detection overlay: pixel coordinates and bounding boxes. Coordinates
// are 12 bits wide, enough for a 3840 x 2160 (4K UHD) frame.
package vision_pkg;

  localparam int CW = 12;   // coordinate width

  typedef logic [CW-1:0] coord_t;

  typedef struct packed {
    coord_t x0, y0;   // top-left corner, inclusive
    coord_t x1, y1;   // bottom-right corner, inclusive
  } bbox_t;

  typedef struct packed {
    logic [7:0] r, g, b;
  } rgb_t;

endpackage
