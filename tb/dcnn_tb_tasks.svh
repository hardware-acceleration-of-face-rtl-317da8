// Bus tasks and the reference model shared by the accelerator testbenches.
// Expects in scope: clk, the ps_* signals, the DDR model u_ddr, issue_cycles,
// checks, failures and the localparam N_PE.
  int fm [2][N_PE][4096];        // model of both feature-map banks
  int kern [N_PE][4096];         // kernels of the current layer
  int bias_m [N_PE];
  logic [31:0] rd;
  int n_conv = 0, n_pool = 0, n_group = 0;

  // Bus signals change at the falling edge; a request is accepted at a
  // rising edge where ps_ready is high. Read data is taken at the falling
  // edge after the acceptance, where ps_rvalid is high.
  task automatic ps_write(logic [23:0] a, logic [31:0] d);
    @(negedge clk);
    ps_req = 1; ps_we = 1; ps_addr = a; ps_wdata = d;
    while (!ps_ready) @(negedge clk);
    @(negedge clk);
    ps_req = 0; ps_we = 0;
  endtask

  task automatic ps_read(logic [23:0] a, output logic [31:0] d);
    @(negedge clk);
    ps_req = 1; ps_we = 0; ps_addr = a;
    while (!ps_ready) @(negedge clk);
    @(negedge clk);
    ps_req = 0;
    if (!ps_rvalid) begin failures++; $display("no rvalid"); end
    d = ps_rdata;
  endtask

  function automatic logic [23:0] fm_addr(int bank, int map, int word);
    return {RGN_FMAP, 1'(bank), 9'(map), 12'(word)};
  endfunction

  task automatic fill_input(int bank, int c, int h, int w, int seed);
    for (int ch = 0; ch < c; ch++)
      for (int i = 0; i < h * w; i++) begin
        fm[bank][ch][i] = int'($urandom_range(0, 4095)) - 2048;
        ps_write(fm_addr(bank, ch, i), 32'(fm[bank][ch][i]));
      end
  endtask

  task automatic write_layer_regs(op_e op, int src, int cin, int cout, int h, int w, int oh, int ow,
                                  int k, int s, int p, int relu, int g2, int ddr);
    ps_write(24'(REG_OP), {25'd0, 1'(g2), 1'(relu), 1'(src), 2'd0, op});
    ps_write(24'(REG_CH), {6'd0, 10'(cout), 6'd0, 10'(cin)});
    ps_write(24'(REG_IN), {4'd0, 12'(h), 4'd0, 12'(w)});
    ps_write(24'(REG_OUT), {4'd0, 12'(oh), 4'd0, 12'(ow)});
    ps_write(24'(REG_KER), {20'd0, 4'(p), 4'(s), 4'(k)});
    ps_write(24'(REG_DDR), 32'(ddr));
  endtask

  function automatic int sat18(longint v);
    if (v > 131071) return 131071;
    if (v < -131072) return -131072;
    return int'(v);
  endfunction

  task automatic run_conv(int src, int cin, int cout, int h, int w, int k, int s, int p,
                          int relu, int g2, int ddr);
    int oh = (h + 2 * p - k) / s + 1, ow = (w + 2 * p - k) / s + 1;
    int g = g2 ? 2 : 1, gc = cin / g, gf = cout / g, wpf = gc * k * k;
    int dst = 1 - src;
    int goff = (((gf * wpf) + 127) / 128) * 256;
    int exp_issue = g * oh * ow * gc * k * k;
    // random kernels and biases; kernels packed into DDR per group
    for (int gi = 0; gi < g; gi++)
      for (int f = 0; f < gf; f++)
        for (int j = 0; j < wpf; j++) begin
          int word = f * wpf + j;
          int byte_a = ddr + gi * goff + word * 2;
          kern[gi * gf + f][j] = int'($urandom_range(0, 511)) - 256;
          u_ddr.mem[byte_a / 16][16 * ((byte_a / 2) % 8) +: 16] = 16'(kern[gi * gf + f][j]);
        end
    for (int f = 0; f < cout; f++) begin
      bias_m[f] = int'($urandom_range(0, 8191)) - 4096;
      ps_write({RGN_BIAS, 22'(f)}, 32'(bias_m[f]));
    end
    write_layer_regs(OP_CONV, src, cin, cout, h, w, oh, ow, k, s, p, relu, g2, ddr);
    issue_cycles = 0;
    ps_write(24'(REG_CTRL), 1);
    while (!irq) @(posedge clk);
    n_conv += g;
    if (g2) n_group++;
    checks++;
    if (issue_cycles != exp_issue) begin
      failures++; $display("conv issue cycles %0d exp %0d", issue_cycles, exp_issue);
    end
    // reference and read back
    for (int f = 0; f < cout; f++) begin
      int gi = f / gf;
      for (int oy = 0; oy < oh; oy++)
        for (int ox = 0; ox < ow; ox++) begin
          longint acc = longint'(bias_m[f]) <<< 7;
          longint r;
          for (int c = 0; c < gc; c++)
            for (int ky = 0; ky < k; ky++)
              for (int kx = 0; kx < k; kx++) begin
                int iy = oy * s + ky - p, ix = ox * s + kx - p;
                if (iy >= 0 && iy < h && ix >= 0 && ix < w)
                  acc += longint'(fm[src][gi * gc + c][iy * w + ix]) * longint'(kern[f][(c * k + ky) * k + kx]);
              end
          r = acc >>> 7;
          if (relu && r < 0) r = 0;
          fm[dst][f][oy * ow + ox] = sat18(r);
          ps_read(fm_addr(dst, f, oy * ow + ox), rd);
          checks++;
          if (int'(rd) != fm[dst][f][oy * ow + ox]) begin
            failures++;
            if (failures < 10) $display("conv map %0d (%0d,%0d): got %0d exp %0d", f, oy, ox, int'(rd), fm[dst][f][oy * ow + ox]);
          end
        end
    end
  endtask

  task automatic run_pool(int src, int c, int h, int w, int k, int s);
    int oh = (h - k) / s + 1, ow = (w - k) / s + 1;
    int dst = 1 - src;
    write_layer_regs(OP_POOL, src, c, c, h, w, oh, ow, k, s, 0, 0, 0, 0);
    issue_cycles = 0;
    ps_write(24'(REG_CTRL), 1);
    while (!irq) @(posedge clk);
    n_pool++;
    checks++;
    if (issue_cycles != oh * ow * k * k) begin
      failures++; $display("pool issue cycles %0d exp %0d", issue_cycles, oh * ow * k * k);
    end
    for (int ch = 0; ch < c; ch++)
      for (int oy = 0; oy < oh; oy++)
        for (int ox = 0; ox < ow; ox++) begin
          int m = -200000;
          for (int py = 0; py < k; py++)
            for (int px = 0; px < k; px++)
              if (fm[src][ch][(oy * s + py) * w + ox * s + px] > m) m = fm[src][ch][(oy * s + py) * w + ox * s + px];
          fm[dst][ch][oy * ow + ox] = m;
          ps_read(fm_addr(dst, ch, oy * ow + ox), rd);
          checks++;
          if (int'(rd) != m) begin
            failures++;
            if (failures < 10) $display("pool map %0d (%0d,%0d): got %0d exp %0d", ch, oy, ox, int'(rd), m);
          end
        end
  endtask
