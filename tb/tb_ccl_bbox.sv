// tb_ccl_bbox: frames of random rectangles, U shapes and diagonal strokes
// (which force regions to merge, also in chains) plus noise, streamed with
// gaps; the set of candidate boxes must equal that of a flood-fill
// reference with the same minimum area. A frame with a chain of merges
// checks that old labels resolve through several merges. A final frame of isolated pixels
// exceeds the label table and must raise overflow. Counts the merges seen.
module tb_ccl_bbox;
  import vision_pkg::*;
  localparam int W = 40, H = 30, MAX_LABELS = 64, MIN_AREA = 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, merges = 0;
  logic in_valid = 0, in_pix = 0, cand_valid, frame_done, overflow;
  bbox_t cand_box;
  ccl_bbox #(.W(W), .H(H), .MAX_LABELS(MAX_LABELS), .MIN_AREA(MIN_AREA)) dut (.*);
  `include "vision_tb_model.svh"

  bbox_t got[$];
  always @(posedge clk) if (rst_n && cand_valid) got.push_back(cand_box);
  always @(posedge clk) if (rst_n && dut.pix_step && dut.in_pix && dut.any && dut.a != dut.b) merges++;

  task automatic send(input img_t im);
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        @(negedge clk); in_valid = 1; in_pix = im[y][x];
        if ($urandom_range(0, 4) == 0) begin @(negedge clk); in_valid = 0; end
      end
    @(negedge clk); in_valid = 0;
    while (!frame_done) @(negedge clk);
    repeat (3) @(negedge clk);
  endtask

  function automatic void rect(inout img_t im, input int x0, int y0, int x1, int y1);
    for (int y = y0; y <= y1 && y < H; y++) for (int x = x0; x <= x1 && x < W; x++) im[y][x] = 1;
  endfunction

  initial begin
    img_t im;
    bbox_t exp_b[$];
    repeat (3) @(posedge clk); rst_n <= 1;
    for (int f = 0; f < 8; f++) begin
      for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) im[y][x] = $urandom_range(0, 99) < 4;
      for (int k = 0; k < 4; k++) begin
        int x0 = $urandom_range(0, W - 8), y0 = $urandom_range(0, H - 8);
        int ww = $urandom_range(2, 9), hh = $urandom_range(2, 9);
        case ($urandom_range(0, 2))
          0: rect(im, x0, y0, x0 + ww, y0 + hh);
          1: begin  // U shape, arms meet at the bottom
            rect(im, x0, y0, x0, y0 + hh);
            rect(im, x0 + ww, y0, x0 + ww, y0 + hh);
            rect(im, x0, y0 + hh, x0 + ww, y0 + hh);
          end
          default: for (int i = 0; i < hh + 4 && y0 + i < H && x0 + 6 - i >= 0; i++) im[y0 + i][x0 + 6 - i] = 1;
        endcase
      end
      // a comb: several teeth joined by the last row, merged into one chain
      if (f % 2 == 0) begin
        for (int t = 0; t < 5; t++) rect(im, 2 + 3 * t, 20, 2 + 3 * t, 27);
        rect(im, 2, 28, 14, 28);
      end
      got = {};
      send(im);
      regions(im, MIN_AREA, exp_b);
      got.sort();
      checks++;
      if (got.size() != exp_b.size()) begin
        failures++; $display("frame %0d: %0d boxes, expected %0d", f, got.size(), exp_b.size());
      end
      for (int i = 0; i < got.size() && i < exp_b.size(); i++) begin
        checks++;
        if (got[i] != exp_b[i]) begin
          failures++;
          if (failures < 10) $display("frame %0d box %0d: got %0d,%0d-%0d,%0d exp %0d,%0d-%0d,%0d", f, i,
            got[i].x0, got[i].y0, got[i].x1, got[i].y1, exp_b[i].x0, exp_b[i].y0, exp_b[i].x1, exp_b[i].y1);
        end
      end
      checks++;
      if (overflow) begin failures++; $display("unexpected overflow"); end
    end
    // a merge chain: three bars labelled right to left (1 rightmost); one
    // row joins them, merging label 3 into 2 and then 2 into 1. A pixel
    // below and left of the left bar sees only label 3 in the row buffer,
    // which must resolve to 1 for the box to reach it.
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) im[y][x] = 0;
    rect(im, 30, 0, 30, 12); rect(im, 10, 2, 10, 12); rect(im, 2, 4, 2, 10);
    rect(im, 2, 10, 30, 10);
    im[11][1] = 1;
    got = {};
    send(im);
    regions(im, MIN_AREA, exp_b);
    checks++;
    if (got.size() != 1 || exp_b.size() != 1 || got[0] != exp_b[0]) begin
      failures++; $display("merge chain: %0d boxes", got.size());
    end
    // label overflow: a grid of isolated pixels needs more labels than the table has
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) im[y][x] = (x % 2 == 0) && (y % 2 == 0);
    send(im);
    checks++;
    if (!overflow) begin failures++; $display("overflow not reported"); end
    $display("merges %0d", merges);
    checks++;
    if (merges == 0) begin failures++; $display("no merge happened"); end
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
