// tb_pool_unit: random windows of random size over all channels; each
// lane's maximum is computed here and must appear one cycle after in_last.
module tb_pool_unit;
  import dcnn_pkg::*;
  localparam int N_CH = 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic in_valid = 0, in_first = 0, in_last = 0, out_valid;
  data_t [N_CH-1:0] in_data = '0, out_data;
  pool_unit #(.N_CH(N_CH)) dut (.*);

  initial begin
    int n;
    int mx [N_CH];
    repeat (3) @(posedge clk); rst_n <= 1;
    for (int t = 0; t < 200; t++) begin
      n = 1 + $urandom_range(0, 9);
      for (int c = 0; c < N_CH; c++) mx[c] = -1000000;
      for (int i = 0; i < n; i++) begin
        @(negedge clk);
        in_valid = 1; in_first = (i == 0); in_last = (i == n - 1);
        for (int c = 0; c < N_CH; c++) begin
          in_data[c] = data_t'($urandom);
          if (int'(in_data[c]) > mx[c]) mx[c] = int'(in_data[c]);
        end
      end
      @(negedge clk);
      in_valid = 0; in_first = 0; in_last = 0;
      checks++;
      if (!out_valid) begin failures++; $display("no out_valid"); end
      for (int c = 0; c < N_CH; c++) begin
        checks++;
        if (int'(out_data[c]) != mx[c]) begin
          failures++;
          if (failures < 10) $display("ch %0d got %0d exp %0d", c, out_data[c], mx[c]);
        end
      end
      if ($urandom_range(0, 1)) begin
        @(negedge clk);
        checks++;
        if (out_valid) begin failures++; $display("spurious out_valid"); end
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
