// tb_dcnn_ctrl: runs a grouped convolution with padding and stride and a
// pooling layer through the controller alone. Kernel loads are answered by
// a model after a random delay. Every issued pixel (read address, padding,
// channel, kernel address, first/last, output address), the load commands,
// the PE enables, the issue count and done are checked against the loop
// nest written out here.
module tb_dcnn_ctrl;
  import dcnn_pkg::*;
  localparam int N_PE = 8, KDEPTH = 256, FDEPTH = 256;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  layer_cfg_t cfg = '0;
  logic start = 0, busy, done, ld_start, ld_done = 0;
  logic [31:0] ld_base; logic [2:0] ld_f0; logic [3:0] ld_nf; logic [8:0] ld_wpf;
  logic iss_valid, iss_pool, iss_first, iss_last, iss_pad;
  logic [2:0] iss_ch; logic [7:0] iss_rd_addr, iss_k_addr, iss_wr_addr;
  logic [N_PE-1:0] pe_en, ch_en;
  dcnn_ctrl #(.N_PE(N_PE), .KDEPTH(KDEPTH), .FDEPTH(FDEPTH)) dut (.*);

  // expected issue stream
  typedef struct { int rd; bit pad; int ch; int k; bit first, last; int wr; } iss_t;
  iss_t exp_q[$];
  int loads, n_issue;

  // DDR reader model
  always @(posedge clk) begin
    if (ld_start) begin
      loads++;
      fork begin
        repeat ($urandom_range(1, 20)) @(posedge clk);
        ld_done <= 1; @(posedge clk); ld_done <= 0;
      end join_none
    end
  end

  always @(posedge clk) if (rst_n && iss_valid) begin
    iss_t e;
    n_issue++;
    checks++;
    if (exp_q.size() == 0) begin failures++; $display("unexpected issue %0d state %0d t %0t", n_issue, dut.state, $time); end
    else begin
      e = exp_q.pop_front();
      if ((!e.pad && iss_rd_addr != 8'(e.rd)) || iss_pad != e.pad || (!iss_pool && iss_ch != 3'(e.ch)) ||
          (!iss_pool && iss_k_addr != 8'(e.k)) || iss_first != e.first || iss_last != e.last ||
          iss_wr_addr != 8'(e.wr)) begin
        failures++;
        if (failures < 10) $display("issue %0d: rd %0d/%0d pad %b/%b ch %0d/%0d k %0d/%0d f %b/%b l %b/%b wr %0d/%0d",
          n_issue, iss_rd_addr, e.rd, iss_pad, e.pad, iss_ch, e.ch, iss_k_addr, e.k, iss_first, e.first,
          iss_last, e.last, iss_wr_addr, e.wr);
      end
    end
  end

  task automatic expect_conv(int cin, int cout, int h, int w, int k, int s, int p, bit g2, int grp);
    int oh = (h + 2 * p - k) / s + 1, ow = (w + 2 * p - k) / s + 1;
    int gc = g2 ? cin / 2 : cin;
    for (int oy = 0; oy < oh; oy++)
      for (int ox = 0; ox < ow; ox++)
        for (int c = 0; c < gc; c++)
          for (int ky = 0; ky < k; ky++)
            for (int kx = 0; kx < k; kx++) begin
              iss_t e;
              int iy = oy * s + ky - p, ix = ox * s + kx - p;
              e.pad = iy < 0 || ix < 0 || iy >= h || ix >= w;
              e.rd = iy * w + ix; e.ch = grp * gc + c; e.k = (c * k + ky) * k + kx;
              e.first = c == 0 && ky == 0 && kx == 0; e.last = c == gc - 1 && ky == k - 1 && kx == k - 1;
              e.wr = oy * ow + ox;
              exp_q.push_back(e);
            end
  endtask

  initial begin
    repeat (3) @(posedge clk); rst_n <= 1;
    // grouped convolution: 6 -> 4 maps, 7x6 input, 3x3, stride 2, pad 1
    cfg.op = OP_CONV; cfg.groups2 = 1; cfg.in_ch = 6; cfg.out_ch = 4; cfg.in_h = 7; cfg.in_w = 6;
    cfg.ksize = 3; cfg.stride = 2; cfg.pad = 1; cfg.out_h = 4; cfg.out_w = 3; cfg.ddr_base = 32'h1000;
    expect_conv(6, 4, 7, 6, 3, 2, 1, 1, 0);
    expect_conv(6, 4, 7, 6, 3, 2, 1, 1, 1);
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    // first load: filters 0..1, 3*9 words each
    while (!ld_start) @(negedge clk);
    checks++;
    if (ld_f0 != 0 || ld_nf != 2 || ld_wpf != 27 || ld_base != 32'h1000) begin failures++; $display("load 0 cmd"); end
    while (!iss_valid) @(negedge clk);
    checks++; if (pe_en != 8'b0000_0011) begin failures++; $display("pe_en g0 %b", pe_en); end
    while (!ld_start) @(negedge clk);
    checks++;
    if (ld_f0 != 2 || ld_nf != 2 || ld_wpf != 27 || ld_base != 32'h1100) begin failures++; $display("load 1 cmd %h", ld_base); end
    while (!iss_valid) @(negedge clk);
    checks++; if (pe_en != 8'b0000_1100) begin failures++; $display("pe_en g1 %b", pe_en); end
    while (!done) @(negedge clk);
    checks++; if (exp_q.size() != 0 || n_issue != 2 * 12 * 27 || loads != 2) begin failures++; $display("conv count %0d", n_issue); end
    // pooling 3x3 stride 2 over a 7x7 map, 5 channels
    cfg = '0; cfg.op = OP_POOL; cfg.in_ch = 5; cfg.in_h = 7; cfg.in_w = 7; cfg.ksize = 3; cfg.stride = 2;
    cfg.out_h = 3; cfg.out_w = 3;
    for (int oy = 0; oy < 3; oy++) for (int ox = 0; ox < 3; ox++) for (int py = 0; py < 3; py++) for (int px = 0; px < 3; px++) begin
      iss_t e;
      e.pad = 0; e.rd = (oy * 2 + py) * 7 + ox * 2 + px; e.ch = 0; e.k = 0;
      e.first = py == 0 && px == 0; e.last = py == 2 && px == 2; e.wr = oy * 3 + ox;
      exp_q.push_back(e);
    end
    n_issue = 0;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    checks++; if (exp_q.size() != 0 || n_issue != 81 || loads != 2) begin failures++; $display("pool count"); end
    checks++; if (ch_en != 8'b0001_1111) begin failures++; $display("ch_en %b", ch_en); end
    checks++; if (busy) begin failures++; $display("busy after done"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
