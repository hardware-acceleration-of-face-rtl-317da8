// tb_ddr_reader: loads kernels of several filter ranges and sizes from a DDR
// model with random stalls into a kernel-bank model and checks every word
// written, that nothing else is written, the burst count, and done.
module tb_ddr_reader;
  import dcnn_pkg::*;
  localparam int N_PE = 16, KDEPTH = 256;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start = 0; logic [31:0] base = 0;
  logic [3:0] f0 = 0; logic [4:0] nf = 0; logic [8:0] wpf = 0;
  logic busy, done, ar_valid, ar_ready, r_valid, r_ready, r_last;
  logic [31:0] ar_addr; logic [7:0] ar_len; logic [127:0] r_data;
  logic k_wr_en; logic [3:0] k_wr_filter; logic [7:0] k_wr_addr; weight_t k_wr_data;

  ddr_reader #(.N_PE(N_PE), .KDEPTH(KDEPTH)) dut (.*);
  ddr_model #(.DEPTH(1024)) u_ddr (.clk, .rst_n, .ar_valid, .ar_ready, .ar_addr, .ar_len,
                                   .r_valid, .r_ready, .r_data, .r_last);

  weight_t got [N_PE][KDEPTH];
  int nwrites;
  always @(posedge clk) if (k_wr_en) begin got[k_wr_filter][k_wr_addr] = k_wr_data; nwrites++; end

  task automatic run(int b, int ff0, int nnf, int w);
    int bursts0, total;
    for (int i = 0; i < N_PE; i++) for (int j = 0; j < KDEPTH; j++) got[i][j] = '0;
    nwrites = 0;
    for (int i = 0; i < 1024; i++)
      for (int l = 0; l < 8; l++)
        u_ddr.mem[i][16*l +: 16] = 16'($urandom_range(1, 511));
    bursts0 = u_ddr.n_bursts;
    @(posedge clk);
    base <= 32'(b); f0 <= 4'(ff0); nf <= 5'(nnf); wpf <= 9'(w); start <= 1;
    @(posedge clk); start <= 0;
    while (!done) @(posedge clk);
    total = nnf * w;
    for (int k = 0; k < total; k++) begin
      int beat = b / 16 + k / 8, lane = k % 8;
      weight_t e = weight_t'(u_ddr.mem[beat][16*lane +: 9]);
      checks++;
      if (got[ff0 + k / w][k % w] !== e) begin
        failures++;
        if (failures < 10) $display("word %0d: got %0d exp %0d", k, got[ff0 + k / w][k % w], e);
      end
    end
    checks++;
    if (nwrites != total) begin failures++; $display("writes %0d exp %0d", nwrites, total); end
    checks++;
    if (u_ddr.n_bursts - bursts0 != ((total + 7) / 8 + 15) / 16) begin
      failures++; $display("bursts %0d", u_ddr.n_bursts - bursts0);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk); rst_n <= 1;
    run(0, 0, 16, 25);
    run(256, 3, 5, 11);
    run(512, 8, 8, 256);
    run(0, 15, 1, 1);
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
