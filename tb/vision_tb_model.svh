// Reference model of the pre-processing chain and a raster-stream driver,
// shared by the pre-processing testbenches. Images are W x H arrays indexed
// [y][x]; pixels outside the frame count as 0.
  typedef bit img_t [H][W];

  function automatic bit px_at(input img_t im, int y, int x);
    if (y < 0 || x < 0 || y >= H || x >= W) return 0;
    return im[y][x];
  endfunction

  // mode 0: median (majority of 9), 1: erosion, 2: dilation
  function automatic void filt(input img_t im, output img_t o, input int mode);
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        int n = 0;
        for (int dy = -1; dy <= 1; dy++)
          for (int dx = -1; dx <= 1; dx++) n += px_at(im, y + dy, x + dx);
        o[y][x] = (mode == 0) ? (n >= 5) : (mode == 1) ? (n == 9) : (n > 0);
      end
  endfunction

  // skin rule written with real-valued colour conversions
  function automatic bit skin_ref(int r, int g, int b);
    real mx, mn, h, s;
    int cb, cr;
    mx = (r > g && r > b) ? r : (g > b ? g : b);
    mn = (r < g && r < b) ? r : (g < b ? g : b);
    cb = 128 + int'($floor((-43.0 * r - 85.0 * g + 128.0 * b) / 256.0));
    cr = 128 + int'($floor((128.0 * r - 107.0 * g - 21.0 * b) / 256.0));
    if (!(r > 95 && g > 40 && b > 20 && mx - mn > 15 && (r - g > 15 || g - r > 15) && r > g && r > b)) return 0;
    if (!(cb >= 77 && cb <= 127 && cr >= 133 && cr <= 173)) return 0;
    h = 60.0 * (g - b) / (mx - mn);   // R is the maximum here
    s = (mx - mn) / mx;
    return h >= 0.0 && h <= 50.0 && s * 100.0 >= 23.0 && s * 100.0 <= 68.0;
  endfunction

  // 8-connected regions by flood fill; boxes with area >= min_area, each
  // packed as {x0, y0, x1, y1} and sorted
  function automatic void regions(input img_t im, input int min_area, output bbox_t boxes[$]);
    int lab [H][W];
    int stack_y[$], stack_x[$];
    boxes = {};
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) lab[y][x] = 0;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++)
        if (im[y][x] && lab[y][x] == 0) begin
          bbox_t bx;
          bx.x0 = coord_t'(x); bx.x1 = coord_t'(x); bx.y0 = coord_t'(y); bx.y1 = coord_t'(y);
          lab[y][x] = 1;
          stack_y.push_back(y); stack_x.push_back(x);
          while (stack_y.size() > 0) begin
            int cy = stack_y.pop_back(), cx = stack_x.pop_back();
            if (coord_t'(cx) < bx.x0) bx.x0 = coord_t'(cx);
            if (coord_t'(cx) > bx.x1) bx.x1 = coord_t'(cx);
            if (coord_t'(cy) < bx.y0) bx.y0 = coord_t'(cy);
            if (coord_t'(cy) > bx.y1) bx.y1 = coord_t'(cy);
            for (int dy = -1; dy <= 1; dy++)
              for (int dx = -1; dx <= 1; dx++)
                if (px_at(im, cy + dy, cx + dx) && lab[cy + dy][cx + dx] == 0) begin
                  lab[cy + dy][cx + dx] = 1;
                  stack_y.push_back(cy + dy); stack_x.push_back(cx + dx);
                end
          end
          if ((int'(bx.x1) - int'(bx.x0) + 1) * (int'(bx.y1) - int'(bx.y0) + 1) >= min_area)
            boxes.push_back(bx);
        end
    boxes.sort();
  endfunction
