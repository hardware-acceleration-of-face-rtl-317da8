// ccl_bbox: single-pass connected-component labelling of the cleaned skin
// map, producing one bounding box per skin region, with the size check that
// drops small regions.
//
// Pixels arrive in raster order (W x H, one per cycle when in_valid). A row
// buffer keeps the labels of the previous row. A foreground pixel takes the
// smallest label among its 8-connected, already seen neighbours (left,
// up-left, up, up-right) or a fresh label if it has none. In 8-connectivity
// at most two different regions meet at a pixel; when they do they are
// merged on the spot: every entry of the equivalence table that points to
// the larger label is redirected to the smaller one in the same cycle, so
// the table always maps a label straight to its region's representative
// and each neighbour is resolved with a single lookup. The bounding box of
// the surviving label absorbs that of the merged one.
//
// After the frame's last pixel the table is scanned, one label per cycle:
// every representative label whose box covers at least MIN_AREA pixels is
// sent out as a candidate (cand_valid, cand_box); frame_done pulses at the
// end of the scan. A frame may use at most MAX_LABELS-1 labels; pixels that
// would need more stay unlabelled, and overflow, valid with frame_done and
// held until the next one, reports that this happened. The
// next frame must not start before the scan ends (at most MAX_LABELS
// cycles, well inside the vertical blanking).
//
// Labelling into bounding boxes and rejecting small candidates follow the
// reference design. The algorithm, the table size, the use of the box area
// and MIN_AREA are this design's choices.
module ccl_bbox
  import vision_pkg::*;
#(
  parameter int W          = 3840,
  parameter int H          = 2160,
  parameter int MAX_LABELS = 256,
  parameter int MIN_AREA   = 400
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  logic  in_pix,
  output logic  cand_valid,
  output bbox_t cand_box,
  output logic  frame_done,
  output logic  overflow
);

  localparam int LB = $clog2(MAX_LABELS);
  typedef logic [LB-1:0] label_t;

  typedef enum logic [1:0] {S_PIX, S_SCAN, S_CLEAR} state_e;
  state_e state;

  coord_t x, y;
  label_t lbuf [W];
  label_t parent [MAX_LABELS];
  bbox_t  box [MAX_LABELS];
  label_t next_label, cur_l, ul_raw, u_raw, scan;

  // resolved neighbours
  label_t l_r, ul_r, u_r, ur_r, ur_raw, a, b;
  logic   any, ovf_frame;
  always_comb begin
    ur_raw = (y != 0 && int'(x) + 1 < W) ? lbuf[int'(x) + 1] : '0;
    l_r    = parent[cur_l];
    ul_r   = parent[ul_raw];
    u_r    = parent[u_raw];
    ur_r   = parent[ur_raw];
    // a: smallest nonzero, b: largest
    a = '1;
    b = '0;
    for (int k = 0; k < 4; k++) begin
      label_t v;
      v = (k == 0) ? l_r : (k == 1) ? ul_r : (k == 2) ? u_r : ur_r;
      if (v != 0 && v < a) a = v;
      if (v > b) b = v;
    end
    any = b != 0;
  end

  function automatic bbox_t grow(bbox_t q, coord_t px, coord_t py);
    bbox_t r = q;
    if (px < q.x0) r.x0 = px;
    if (px > q.x1) r.x1 = px;
    if (py < q.y0) r.y0 = py;
    if (py > q.y1) r.y1 = py;
    return r;
  endfunction

  function automatic bbox_t box_union(bbox_t p, bbox_t q);
    bbox_t r;
    r.x0 = (p.x0 < q.x0) ? p.x0 : q.x0;
    r.y0 = (p.y0 < q.y0) ? p.y0 : q.y0;
    r.x1 = (p.x1 > q.x1) ? p.x1 : q.x1;
    r.y1 = (p.y1 > q.y1) ? p.y1 : q.y1;
    return r;
  endfunction

  logic pix_step, full;
  label_t new_l;
  always_comb begin
    pix_step = state == S_PIX && in_valid;
    full     = next_label == '0;   // wrapped: every label is in use
    if (!in_pix)   new_l = '0;
    else if (any)  new_l = a;
    else if (full) new_l = '0;
    else           new_l = next_label;
  end

  always_ff @(posedge clk) begin
    if (pix_step) lbuf[x] <= new_l;
  end

  logic [2*CW:0] area;
  always_comb area = (2*CW+1)'(CW'(box[scan].x1 - box[scan].x0) + 1'b1) * (2*CW+1)'(CW'(box[scan].y1 - box[scan].y0) + 1'b1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_PIX; x <= '0; y <= '0; next_label <= label_t'(1);
      cur_l <= '0; ul_raw <= '0; u_raw <= '0; scan <= '0;
      cand_valid <= 1'b0; cand_box <= '0; frame_done <= 1'b0; overflow <= 1'b0; ovf_frame <= 1'b0;
      parent[0] <= '0;
    end else begin
      cand_valid <= 1'b0;
      frame_done <= 1'b0;
      unique case (state)
        S_PIX: if (in_valid) begin
          if (in_pix) begin
            if (any) begin
              box[a] <= grow((a != b) ? box_union(box[a], box[b]) : box[a], x, y);
              if (a != b)
                for (int i = 1; i < MAX_LABELS; i++)
                  if (parent[i] == b) parent[i] <= a;
            end else if (!full) begin
              parent[next_label] <= next_label;
              box[next_label]    <= '{x0: x, y0: y, x1: x, y1: y};
              next_label         <= next_label + 1'b1;
            end else begin
              ovf_frame <= 1'b1;
            end
          end
          cur_l  <= new_l;
          ul_raw <= u_raw;
          u_raw  <= ur_raw;
          if (int'(x) == W - 1) begin
            x      <= '0;
            cur_l  <= '0;
            ul_raw <= '0;
            u_raw  <= lbuf[0];
            if (int'(y) == H - 1) begin
              y     <= '0;
              state <= S_SCAN;
              scan  <= label_t'(1);
            end else y <= y + 1'b1;
          end else x <= x + 1'b1;
        end
        S_SCAN: begin
          if (scan == next_label || scan == '0) begin
            state      <= S_CLEAR;
          end else begin
            if (parent[scan] == scan && area >= (2*CW+1)'(MIN_AREA)) begin
              cand_valid <= 1'b1;
              cand_box   <= box[scan];
            end
            scan <= scan + 1'b1;
          end
        end
        S_CLEAR: begin
          frame_done <= 1'b1;
          overflow   <= ovf_frame;
          ovf_frame  <= 1'b0;
          next_label <= label_t'(1);
          u_raw      <= '0;
          state      <= S_PIX;
        end
        default: state <= S_PIX;
      endcase
    end
  end

  a_no_input_during_scan: assert property (@(posedge clk) disable iff (!rst_n)
    state != S_PIX |-> !in_valid);

endmodule
