// tb_kernel_bank: writes random weights to every filter block one word per
// cycle, then reads every address and checks all blocks' outputs one cycle
// after the read; also checks that rd_data holds while rd_en is low.
module tb_kernel_bank;
  import dcnn_pkg::*;
  localparam int N_PE = 12, KDEPTH = 64;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic wr_en = 0, rd_en = 0;
  logic [3:0] wr_filter = 0;
  logic [5:0] wr_addr = 0, rd_addr = 0;
  weight_t wr_data = 0;
  weight_t [N_PE-1:0] rd_data, held;
  weight_t model [N_PE][KDEPTH];

  kernel_bank #(.N_PE(N_PE), .KDEPTH(KDEPTH)) dut (.*);

  initial begin
    for (int f = 0; f < N_PE; f++)
      for (int a = 0; a < KDEPTH; a++) begin
        model[f][a] = weight_t'($urandom);
        wr_en <= 1; wr_filter <= 4'(f); wr_addr <= 6'(a); wr_data <= model[f][a];
        @(posedge clk);
      end
    wr_en <= 0;
    for (int a = 0; a < KDEPTH; a++) begin
      rd_en <= 1; rd_addr <= 6'(a);
      @(posedge clk);
      rd_en <= 0;
      @(negedge clk);
      for (int f = 0; f < N_PE; f++) begin
        checks++;
        if (rd_data[f] !== model[f][a]) begin
          failures++;
          if (failures < 10) $display("f %0d a %0d got %0d exp %0d", f, a, rd_data[f], model[f][a]);
        end
      end
      held = rd_data;
      rd_addr <= 6'(a + 1);
      @(posedge clk);
      @(negedge clk);
      checks++;
      if (rd_data !== held) begin failures++; $display("rd_data changed without rd_en"); end
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
