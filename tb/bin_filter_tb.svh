// Stimulus and checking for the 3x3 binary filters. Expects in scope: clk,
// rst_n, in_valid, in_pix, out_valid, out_pix, d_valid, d_pix, checks,
// failures, W, H and the model functions. out_* is checked against filter
// mode `mode`; with mode 1 (erosion) d_* is checked against dilation.
  bit oq[$], dq[$];
  always @(posedge clk) if (rst_n && out_valid) oq.push_back(out_pix);
  always @(posedge clk) if (rst_n && d_valid) dq.push_back(d_pix);

  task automatic check_q(const ref bit q[$], input img_t ex, input int f);
    checks++;
    if (q.size() != W * H) begin failures++; $display("frame %0d: %0d pixels", f, q.size()); end
    for (int i = 0; i < W * H && i < q.size(); i++) begin
      checks++;
      if (q[i] != ex[i / W][i % W]) begin
        failures++;
        if (failures < 10) $display("frame %0d pixel (%0d,%0d) got %b", f, i % W, i / W, q[i]);
      end
    end
  endtask

  task automatic send_frame(input img_t im);
    for (int y = 0; y < H; y++) begin
      for (int x = 0; x < W; x++) begin
        @(negedge clk);
        in_valid = 1; in_pix = im[y][x];
        // random gaps inside a line
        if ($urandom_range(0, 3) == 0) begin
          @(negedge clk); in_valid = 0;
        end
      end
      @(negedge clk); in_valid = 0;           // one idle cycle after each line
      repeat ($urandom_range(0, 2)) @(negedge clk);
    end
    repeat (W + 2 + $urandom_range(0, 3)) @(negedge clk);  // vertical blanking
  endtask

  task automatic run_filter_test(int mode);
    img_t im, ex, ex2;
    repeat (3) @(posedge clk); rst_n <= 1;
    for (int f = 0; f < 3; f++) begin
      int dens = (f == 0) ? 50 : (f == 1) ? 80 : 30;
      for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) im[y][x] = $urandom_range(0, 99) < dens;
      oq = {}; dq = {};
      send_frame(im);
      repeat (5) @(negedge clk);
      filt(im, ex, mode);
      check_q(oq, ex, f);
      if (mode == 1) begin
        filt(im, ex2, 2);
        check_q(dq, ex2, f);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
