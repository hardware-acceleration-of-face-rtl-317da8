// tb_dcnn_alexnet: the accelerator at its default size (384 PEs, 4096-word
// kernel blocks, 1024-word feature maps, no parameter overrides) running the
// last convolutional stage of an AlexNet-shaped classifier on 13 x 13 maps:
//   conv3: 256 -> 384 maps, 3x3, pad 1, ReLU, one pass (2304 weights/filter)
//   conv4: 384 -> 384 maps, 3x3, pad 1, ReLU, two filter groups of 192
//   conv5: 384 -> 256 maps, 3x3, pad 1, ReLU, two filter groups of 128
//   pool5: 3x3 max pooling, stride 2, 256 maps -> 6 x 6
// The layer shapes are AlexNet's; the input is random. Every output value is
// compared with the reference model in dcnn_tb_tasks.svh, and each pass must
// take out_h*out_w*(C/G)*K*K issue cycles (one receptive-field pixel per
// clock). Kernels come from a DDR model with random stalls.
module tb_dcnn_alexnet;
  import dcnn_pkg::*;
  localparam int N_PE = 384;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic ps_req = 0, ps_ready, ps_we = 0, ps_rvalid, irq;
  logic [23:0] ps_addr = 0; logic [31:0] ps_wdata = 0, ps_rdata;
  logic ddr_ar_valid, ddr_ar_ready, ddr_r_valid, ddr_r_ready, ddr_r_last;
  logic [31:0] ddr_ar_addr; logic [7:0] ddr_ar_len; logic [127:0] ddr_r_data;

  dcnn_accel dut (.*);
  ddr_model #(.DEPTH(393216)) u_ddr (.clk, .rst_n, .ar_valid(ddr_ar_valid), .ar_ready(ddr_ar_ready),
    .ar_addr(ddr_ar_addr), .ar_len(ddr_ar_len), .r_valid(ddr_r_valid), .r_ready(ddr_r_ready),
    .r_data(ddr_r_data), .r_last(ddr_r_last));

  `include "dcnn_tb_tasks.svh"

  int issue_cycles;
  always @(posedge clk) if (dut.u_ctrl.iss_valid) issue_cycles++;

  initial begin
    repeat (3) @(posedge clk); rst_n <= 1;
    @(posedge clk);
    fill_input(0, 256, 13, 13, 1);
    run_conv(.src(0), .cin(256), .cout(384), .h(13), .w(13), .k(3), .s(1), .p(1), .relu(1), .g2(0), .ddr(32'h000000));
    $display("conv3 done, failures %0d", failures);
    run_conv(.src(1), .cin(384), .cout(384), .h(13), .w(13), .k(3), .s(1), .p(1), .relu(1), .g2(1), .ddr(32'h200000));
    $display("conv4 done, failures %0d", failures);
    run_conv(.src(0), .cin(384), .cout(256), .h(13), .w(13), .k(3), .s(1), .p(1), .relu(1), .g2(1), .ddr(32'h400000));
    $display("conv5 done, failures %0d", failures);
    run_pool(.src(1), .c(256), .h(13), .w(13), .k(3), .s(2));
    checks++;
    if (n_conv != 5 || n_group != 2 || n_pool != 1) begin
      failures++; $display("pass counts conv %0d group %0d pool %0d", n_conv, n_group, n_pool);
    end
    $display("convolution passes: %0d, grouped layers: %0d, pooling layers: %0d, DDR bursts: %0d",
             n_conv, n_group, n_pool, u_ddr.n_bursts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (8000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
