// tb_preproc: synthetic RGB frames with skin-coloured blobs, thin skin
// lines, speckle and non-skin background go through the whole chain; the
// candidate boxes must equal those of a reference that applies the skin
// rule, the median, the erosion, the dilation and flood-fill labelling with
// the same minimum area. Each frame's candidates must arrive before
// frame_done.
module tb_preproc;
  import vision_pkg::*;
  localparam int W = 48, H = 36, MAX_LABELS = 64, MIN_AREA = 20;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic cam_valid = 0, cand_valid, frame_done, overflow;
  rgb_t cam_rgb = '0;
  bbox_t cand_box;
  preproc #(.W(W), .H(H), .MAX_LABELS(MAX_LABELS), .MIN_AREA(MIN_AREA)) dut (.*);
  `include "vision_tb_model.svh"

  bbox_t got[$];
  always @(posedge clk) if (rst_n && cand_valid) got.push_back(cand_box);

  rgb_t frame [H][W];

  function automatic rgb_t skin_col();
    rgb_t c;
    // a range of tones that pass all three rules
    c.r = 8'($urandom_range(180, 230));
    c.g = 8'(int'(c.r) - 60 + $urandom_range(0, 20));
    c.b = 8'(int'(c.g) - 30 + $urandom_range(0, 10));
    return c;
  endfunction

  initial begin
    img_t sk, m, e, d;
    bbox_t exp_b[$];
    int n_cand = 0;
    repeat (3) @(posedge clk); rst_n <= 1;
    for (int f = 0; f < 6; f++) begin
      for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) begin
        frame[y][x].r = 8'($urandom_range(0, 120));
        frame[y][x].g = 8'($urandom_range(60, 200));
        frame[y][x].b = 8'($urandom_range(60, 220));
      end
      for (int k = 0; k < 5; k++) begin   // blobs
        int x0 = $urandom_range(0, W - 12), y0 = $urandom_range(0, H - 12);
        int ww = $urandom_range(4, 12), hh = $urandom_range(4, 12);
        for (int y = y0; y < y0 + hh; y++) for (int x = x0; x < x0 + ww; x++) frame[y][x] = skin_col();
      end
      for (int x = 0; x < W; x++) frame[H / 2][x] = skin_col();   // a thin line the opening removes
      for (int k = 0; k < 30; k++) frame[$urandom_range(0, H - 1)][$urandom_range(0, W - 1)] = skin_col();
      for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) sk[y][x] = skin_ref(frame[y][x].r, frame[y][x].g, frame[y][x].b);
      filt(sk, m, 0); filt(m, e, 1); filt(e, d, 2);
      regions(d, MIN_AREA, exp_b);
      got = {};
      for (int y = 0; y < H; y++) begin
        for (int x = 0; x < W; x++) begin
          @(negedge clk); cam_valid = 1; cam_rgb = frame[y][x];
        end
        @(negedge clk); cam_valid = 0;   // horizontal blanking
        repeat (2) @(negedge clk);
      end
      @(negedge clk); cam_valid = 0;
      while (!frame_done) @(negedge clk);
      repeat (3 * (W + 2)) @(negedge clk);   // vertical blanking
      got.sort();
      n_cand += got.size();
      checks++;
      if (got.size() != exp_b.size()) begin
        failures++; $display("frame %0d: %0d candidates, expected %0d", f, got.size(), exp_b.size());
      end
      for (int i = 0; i < got.size() && i < exp_b.size(); i++) begin
        checks++;
        if (got[i] != exp_b[i]) begin
          failures++;
          $display("frame %0d box %0d: got %0d,%0d-%0d,%0d exp %0d,%0d-%0d,%0d", f, i,
            got[i].x0, got[i].y0, got[i].x1, got[i].y1, exp_b[i].x0, exp_b[i].y0, exp_b[i].x1, exp_b[i].y1);
        end
      end
    end
    checks++;
    if (n_cand == 0) begin failures++; $display("no candidates at all"); end
    $display("candidates %0d", n_cand);
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
