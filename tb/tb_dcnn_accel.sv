// tb_dcnn_accel: runs a small network on the accelerator through its PS bus
// and DDR port and checks every output value against a reference model
// computed here:
//   layer 1: convolution 3 -> 8 maps, 3x3, stride 1, pad 1, ReLU (bank 0 -> 1)
//   layer 2: max pooling 2x2, stride 2 (bank 1 -> 0)
//   layer 3: grouped convolution 8 -> 6 maps, 3x3, stride 2, pad 0, two
//            filter groups, no ReLU (bank 0 -> 1)
//   layer 4: overlapping max pooling 3x3, stride 2 (bank 1 -> 0)
// It also checks the issue rate (one receptive-field pixel per cycle, so a
// pass takes out_h*out_w*(C/G)*K*K issue cycles), that the PS is refused
// while a layer runs, and the status and configuration registers.
module tb_dcnn_accel;
  import dcnn_pkg::*;
  localparam int N_PE = 8, KDEPTH = 256, FDEPTH = 256;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic ps_req = 0, ps_ready, ps_we = 0, ps_rvalid, irq;
  logic [23:0] ps_addr = 0; logic [31:0] ps_wdata = 0, ps_rdata;
  logic ddr_ar_valid, ddr_ar_ready, ddr_r_valid, ddr_r_ready, ddr_r_last;
  logic [31:0] ddr_ar_addr; logic [7:0] ddr_ar_len; logic [127:0] ddr_r_data;

  dcnn_accel #(.N_PE(N_PE), .KDEPTH(KDEPTH), .FDEPTH(FDEPTH)) dut (.*);
  ddr_model #(.DEPTH(4096)) u_ddr (.clk, .rst_n, .ar_valid(ddr_ar_valid), .ar_ready(ddr_ar_ready),
    .ar_addr(ddr_ar_addr), .ar_len(ddr_ar_len), .r_valid(ddr_r_valid), .r_ready(ddr_r_ready),
    .r_data(ddr_r_data), .r_last(ddr_r_last));

  `include "dcnn_tb_tasks.svh"

  int issue_cycles;
  always @(posedge clk) if (dut.u_ctrl.iss_valid) issue_cycles++;

  initial begin
    int refused;
    repeat (3) @(posedge clk); rst_n <= 1;
    @(posedge clk);
    // input image: 3 channels of 10 x 10
    fill_input(0, 3, 10, 10, 1);
    // layer 1
    run_conv(.src(0), .cin(3), .cout(8), .h(10), .w(10), .k(3), .s(1), .p(1), .relu(1), .g2(0), .ddr(0));
    // configuration read-back
    ps_read(24'(REG_KER), rd); checks++; if (rd[11:0] != 12'h113) begin failures++; $display("REG_KER %h", rd); end
    run_pool(.src(1), .c(8), .h(10), .w(10), .k(2), .s(2));
    run_conv(.src(0), .cin(8), .cout(6), .h(5), .w(5), .k(3), .s(2), .p(0), .relu(0), .g2(1), .ddr(4096));
    run_pool(.src(1), .c(6), .h(2), .w(2), .k(2), .s(1));
    // PS access is refused while a layer runs
    write_layer_regs(OP_POOL, 0, 6, 6, 8, 8, 8, 8, 1, 1, 0, 0, 0, 0);
    ps_write(24'(REG_CTRL), 1);
    refused = 0;
    while (!dut.busy) @(negedge clk);
    ps_req = 1; ps_we = 0; ps_addr = {RGN_FMAP, 22'd0};
    @(negedge clk);
    if (!ps_ready) refused = 1;
    ps_req = 0;
    while (!irq) @(posedge clk);
    checks++; if (!refused) begin failures++; $display("PS not refused while busy"); end
    ps_read(24'(REG_STATUS), rd); checks++; if (rd[1:0] != 2'b10) begin failures++; $display("status %h", rd); end
    $display("convolution passes: %0d, pooling layers: %0d, grouped layers: %0d", n_conv, n_pool, n_group);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
