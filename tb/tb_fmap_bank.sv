// tb_fmap_bank: writes all maps in parallel with per-map enables (random
// subsets, several passes), then reads every address and checks all maps
// one cycle after the read.
module tb_fmap_bank;
  import dcnn_pkg::*;
  localparam int N_MAP = 10, FDEPTH = 64;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rd_en = 0;
  logic [5:0] rd_addr = 0, wr_addr = 0;
  logic [N_MAP-1:0] wr_en = 0;
  data_t [N_MAP-1:0] rd_data, wr_data;
  data_t model [N_MAP][FDEPTH];

  fmap_bank #(.N_MAP(N_MAP), .FDEPTH(FDEPTH)) dut (.*);

  initial begin
    for (int pass = 0; pass < 3; pass++)
      for (int a = 0; a < FDEPTH; a++) begin
        logic [N_MAP-1:0] en;
        en = (pass == 0) ? '1 : N_MAP'($urandom);
        for (int m = 0; m < N_MAP; m++) begin
          wr_data[m] <= data_t'($urandom);
        end
        wr_en <= en; wr_addr <= 6'(a);
        @(negedge clk);
        for (int m = 0; m < N_MAP; m++) if (en[m]) model[m][a] = wr_data[m];
        @(posedge clk);
      end
    wr_en <= 0;
    for (int a = 0; a < FDEPTH; a++) begin
      rd_en <= 1; rd_addr <= 6'(a);
      @(posedge clk);
      rd_en <= 0;
      @(negedge clk);
      for (int m = 0; m < N_MAP; m++) begin
        checks++;
        if (rd_data[m] !== model[m][a]) begin
          failures++;
          if (failures < 10) $display("m %0d a %0d got %0d exp %0d", m, a, rd_data[m], model[m][a]);
        end
      end
    end
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
