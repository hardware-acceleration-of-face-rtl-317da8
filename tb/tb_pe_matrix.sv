// tb_pe_matrix: broadcasts random fields to a small matrix with per-PE
// weights, biases and enables; enabled PEs must deliver bias + sum of
// products one cycle after in_last, disabled ones must keep their result.
module tb_pe_matrix;
  import dcnn_pkg::*;
  localparam int N_PE = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic in_valid = 0, in_first = 0, in_last = 0, relu = 0;
  data_t in_data = '0;
  weight_t [N_PE-1:0] weights = '0;
  data_t [N_PE-1:0] biases = '0, out_data, prev;
  logic [N_PE-1:0] pe_en = '1, out_valid;
  pe_matrix #(.N_PE(N_PE)) dut (.*);

  initial begin
    longint acc [N_PE];
    int n;
    repeat (3) @(posedge clk); rst_n <= 1;
    for (int t = 0; t < 100; t++) begin
      n = 1 + $urandom_range(0, 20);
      @(negedge clk);
      prev = out_data;
      pe_en = (t < 10) ? '1 : N_PE'($urandom);
      for (int p = 0; p < N_PE; p++) begin
        biases[p] = data_t'(int'($urandom_range(0, 4095)) - 2048);
        acc[p] = longint'(biases[p]) <<< 7;
      end
      for (int i = 0; i < n; i++) begin
        if (i > 0) @(negedge clk);
        in_valid = 1; in_first = (i == 0); in_last = (i == n - 1);
        in_data = data_t'(int'($urandom_range(0, 8191)) - 4096);
        for (int p = 0; p < N_PE; p++) begin
          weights[p] = weight_t'($urandom);
          acc[p] += longint'(in_data) * longint'(weights[p]);
        end
      end
      @(negedge clk);
      in_valid = 0; in_first = 0; in_last = 0;
      for (int p = 0; p < N_PE; p++) begin
        checks++;
        if (pe_en[p]) begin
          longint r;
          r = acc[p] >>> 7;
          if (r > 131071) r = 131071;
          if (r < -131072) r = -131072;
          if (!out_valid[p] || longint'(out_data[p]) != r) begin
            failures++;
            if (failures < 10) $display("pe %0d got %0d exp %0d", p, out_data[p], r);
          end
        end else if (out_valid[p] || out_data[p] != prev[p]) begin
          failures++; $display("disabled pe %0d changed", p);
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
