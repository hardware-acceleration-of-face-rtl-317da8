// End-to-end stimulus for face_detect_top, shared by the reduced-size and
// the full-size testbench. Expects in scope the localparams W, H, MIN_AREA,
// N_PE, N_FRAMES, the DUT signals, the DDR model u_ddr and checks/failures.
//
// Flow per frame: the camera streams a synthetic frame (solid skin-coloured
// rectangles on a non-skin background, one of them too small to be a
// candidate) with line and frame blanking; the display stream is checked
// pixel by pixel against the overlay of the detection slots; the
// candidates must be exactly the large rectangles. The testbench, acting as
// the PS, then samples the first candidate into a 3 x 8 x 8 input, runs
// conv (3 -> N_PE, 3x3, pad 1, ReLU), max pool 2x2/2 and a grouped conv
// (N_PE -> N_PE, 3x3, pad 1) on the accelerator, checks every value, and
// writes the candidate's box into detection slot 0 for the next frame.
  logic irq;
  assign irq = dcnn_irq;
  int issue_cycles;
  always @(posedge clk) if (dut.u_dcnn.u_ctrl.iss_valid) issue_cycles++;
  `include "dcnn_tb_tasks.svh"

  // mechanism counters
  int n_pad = 0, n_ddr_wait = 0, n_merge = 0, n_refused = 0, n_marked = 0, n_small = 0, n_relu0 = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_dcnn.u_ctrl.iss_valid && dut.u_dcnn.u_ctrl.iss_pad) n_pad++;
    if ((ddr_ar_valid && !ddr_ar_ready) || (ddr_r_ready && dut.u_dcnn.u_ddr_reader.busy && !ddr_r_valid)) n_ddr_wait++;
    if (dut.u_preproc.u_ccl.pix_step && dut.u_preproc.u_ccl.in_pix && dut.u_preproc.u_ccl.any &&
        dut.u_preproc.u_ccl.a != dut.u_preproc.u_ccl.b) n_merge++;
  end

  typedef struct { int x0, y0, x1, y1; } rect_t;
  rect_t rects[$];

  function automatic rgb_t pix(int x, int y);
    for (int i = 0; i < rects.size(); i++)
      if (x >= rects[i].x0 && x <= rects[i].x1 && y >= rects[i].y0 && y <= rects[i].y1)
        return rgb_t'({8'd200, 8'd150, 8'd120});            // passes all skin rules
    return rgb_t'({8'(40 + (x % 50)), 8'(90 + (y % 60)), 8'd160});   // bluish, not skin
  endfunction

  bbox_t cand[$];
  always @(posedge clk) if (rst_n && cand_valid) cand.push_back(cand_box);

  bbox_t slot0;
  bit    slot0_used = 0;
  rgb_t  disp_exp[$];
  always @(posedge clk) if (rst_n && disp_valid) begin
    rgb_t e;
    e = disp_exp.pop_front();
    checks++;
    if (disp_rgb != e) begin
      failures++;
      if (failures < 10) $display("display pixel got %h exp %h", disp_rgb, e);
    end
  end

  task automatic stream_frame();
    for (int y = 0; y < H; y++) begin
      for (int x = 0; x < W; x++) begin
        rgb_t p;
        bit on_box;
        p = pix(x, y);
        on_box = slot0_used &&
          (((x == int'(slot0.x0) || x == int'(slot0.x1)) && y >= int'(slot0.y0) && y <= int'(slot0.y1)) ||
           ((y == int'(slot0.y0) || y == int'(slot0.y1)) && x >= int'(slot0.x0) && x <= int'(slot0.x1)));
        if (on_box) n_marked++;
        disp_exp.push_back(on_box ? rgb_t'(24'h00FF00) : p);
        @(negedge clk);
        cam_valid = 1; cam_rgb = p;
      end
      @(negedge clk); cam_valid = 0;     // horizontal blanking
    end
    while (!cand_frame_done) @(negedge clk);
    repeat (3 * (W + 2)) @(negedge clk); // rest of the vertical blanking
  endtask

  task automatic run_top();
    bbox_t exp_c[$];
    repeat (3) @(posedge clk); rst_n <= 1;
    // scene: two face-sized rectangles, one touching the frame edge, a U shape
    // (its arms merge in the labelling), and one too small to be a candidate
    rects.push_back('{W / 8, H / 6, W / 8 + W / 6, H / 6 + H / 4});
    rects.push_back('{W - W / 5, H / 2, W - 1, H - 1});
    rects.push_back('{W / 2, H / 8, W / 2 + 5, H / 8 + H / 3});
    rects.push_back('{W / 2 + W / 8, H / 8, W / 2 + W / 8 + 5, H / 8 + H / 3});
    rects.push_back('{W / 2, H / 8 + H / 3 - 5, W / 2 + W / 8 + 5, H / 8 + H / 3});
    rects.push_back('{W / 3, H - H / 8, W / 3 + 3, H - H / 8 + 3});
    foreach (rects[i]) if (i != 2 && i != 3) begin
      rect_t r = rects[i];
      if (i == 4) r = '{W / 2, H / 8, W / 2 + W / 8 + 5, H / 8 + H / 3};
      if ((r.x1 - r.x0 + 1) * (r.y1 - r.y0 + 1) >= MIN_AREA)
        exp_c.push_back('{x0: coord_t'(r.x0), y0: coord_t'(r.y0), x1: coord_t'(r.x1), y1: coord_t'(r.y1)});
      else n_small++;
    end
    exp_c.sort();
    for (int f = 0; f < N_FRAMES; f++) begin
      cand = {};
      stream_frame();
      cand.sort();
      checks++;
      if (cand.size() != exp_c.size()) begin failures++; $display("%0d candidates, expected %0d", cand.size(), exp_c.size()); end
      foreach (cand[i]) if (i < exp_c.size()) begin
        checks++;
        if (cand[i] != exp_c[i]) begin
          failures++;
          $display("candidate %0d,%0d-%0d,%0d expected %0d,%0d-%0d,%0d", cand[i].x0, cand[i].y0,
                   cand[i].x1, cand[i].y1, exp_c[i].x0, exp_c[i].y0, exp_c[i].x1, exp_c[i].y1);
        end
      end
      if (cand.size() > 0) run_classifier(cand[0]);
    end
    checks++;
    if (disp_exp.size() != 0) begin failures++; $display("%0d display pixels missing", disp_exp.size()); end
    $display("mechanisms: conv passes %0d, pooling %0d, grouped %0d, padded issues %0d, relu clamps %0d,",
             n_conv, n_pool, n_group, n_pad, n_relu0);
    $display("  ddr waits %0d, ps refused %0d, ccl merges %0d, small rejected %0d, overlay pixels %0d",
             n_ddr_wait, n_refused, n_merge, n_small, n_marked);
    if (n_conv == 0 || n_pool == 0 || n_group == 0 || n_pad == 0 || n_relu0 == 0 || n_ddr_wait == 0 ||
        n_refused == 0 || n_merge == 0 || n_small == 0 || n_marked == 0) begin
      failures++; $display("a mechanism was never exercised");
    end
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  // the PS side for one candidate
  task automatic run_classifier(bbox_t b);
    localparam int IN = 8;
    int bw = int'(b.x1) - int'(b.x0) + 1, bh = int'(b.y1) - int'(b.y0) + 1;
    for (int c = 0; c < 3; c++)
      for (int y = 0; y < IN; y++)
        for (int x = 0; x < IN; x++) begin
          rgb_t p = pix(int'(b.x0) + x * bw / IN, int'(b.y0) + y * bh / IN);
          int v = (c == 0) ? p.r : (c == 1) ? p.g : p.b;
          v = (v - 128) <<< 7;   // centred, 7 fraction bits
          fm[0][c][y * IN + x] = v;
          ps_write(fm_addr(0, c, y * IN + x), 32'(v));
        end
    run_conv(.src(0), .cin(3), .cout(N_PE), .h(IN), .w(IN), .k(3), .s(1), .p(1), .relu(1), .g2(0), .ddr(0));
    for (int f = 0; f < N_PE; f++) for (int i = 0; i < IN * IN; i++) if (fm[1][f][i] == 0) n_relu0++;
    run_pool(.src(1), .c(N_PE), .h(IN), .w(IN), .k(2), .s(2));
    // try to read a map while the next layer runs: must be refused
    fork
      run_conv(.src(0), .cin(N_PE), .cout(N_PE), .h(IN / 2), .w(IN / 2), .k(3), .s(1), .p(1),
               .relu(0), .g2(1), .ddr(32'h10_0000));
      begin
        while (!dut.u_dcnn.busy) @(negedge clk);
        repeat (5) @(negedge clk);
        if (!ps_req) begin
          ps_req = 1; ps_we = 0; ps_addr = fm_addr(1, 0, 0);
          @(negedge clk);
          if (!ps_ready) n_refused++;
          ps_req = 0;
        end
      end
    join
    // the fully connected layers run in software; here every candidate is
    // accepted and drawn in the next frame
    @(negedge clk);
    det_we = 1; det_idx = '0; det_set = 1; det_box = b;
    @(negedge clk);
    det_we = 0;
    slot0 = b; slot0_used = 1;
  endtask

  initial run_top();
