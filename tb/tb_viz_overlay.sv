// tb_viz_overlay: fills and clears detection slots, streams two frames with
// gaps and checks every output pixel: box outlines in the marker colour,
// everything else passed through unchanged, one cycle later.
module tb_viz_overlay;
  import vision_pkg::*;
  localparam int W = 20, H = 14, N_DET = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, n_marked = 0;
  logic det_we = 0, det_set = 0, in_valid = 0, out_valid;
  logic [1:0] det_idx = 0;
  bbox_t det_box = '0;
  rgb_t in_rgb = '0, out_rgb;
  viz_overlay #(.W(W), .H(H), .N_DET(N_DET)) dut (.*);

  bbox_t boxes [N_DET];
  bit used [N_DET];

  task automatic set_slot(int i, bit s, int x0, int y0, int x1, int y1);
    @(negedge clk);
    det_we = 1; det_idx = 2'(i); det_set = s;
    det_box = '{x0: coord_t'(x0), y0: coord_t'(y0), x1: coord_t'(x1), y1: coord_t'(y1)};
    boxes[i] = det_box; used[i] = s;
    @(negedge clk); det_we = 0;
  endtask

  initial begin
    for (int i = 0; i < N_DET; i++) used[i] = 0;
    repeat (3) @(posedge clk); rst_n <= 1;
    set_slot(0, 1, 2, 3, 9, 8);
    set_slot(2, 1, 12, 0, 19, 13);
    set_slot(3, 1, 5, 5, 6, 6);
    for (int f = 0; f < 2; f++) begin
      if (f == 1) set_slot(2, 0, 0, 0, 0, 0);
      for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) begin
        rgb_t px; bit on_box;
        @(negedge clk);
        px = rgb_t'($urandom);
        in_valid = 1; in_rgb = px;
        on_box = 0;
        for (int i = 0; i < N_DET; i++)
          if (used[i] && (((x == boxes[i].x0 || x == boxes[i].x1) && y >= boxes[i].y0 && y <= boxes[i].y1) ||
                          ((y == boxes[i].y0 || y == boxes[i].y1) && x >= boxes[i].x0 && x <= boxes[i].x1)))
            on_box = 1;
        @(negedge clk);
        in_valid = 0;
        checks++;
        if (!out_valid || out_rgb != (on_box ? rgb_t'(24'h00FF00) : px)) begin
          failures++;
          if (failures < 10) $display("(%0d,%0d) got %h on box %b", x, y, out_rgb, on_box);
        end
        if (on_box) n_marked++;
      end
    end
    checks++;
    if (n_marked == 0) begin failures++; $display("nothing marked"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
