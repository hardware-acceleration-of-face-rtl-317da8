// tb_dcnn_ps_if: register write/read-back, bias registers, the start pulse,
// the done flag, forwarding of feature-map accesses (with read data
// returned one cycle later), and refusal of map accesses and register
// writes while the accelerator is busy.
module tb_dcnn_ps_if;
  import dcnn_pkg::*;
  localparam int N_PE = 8, FDEPTH = 256;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic ps_req = 0, ps_ready, ps_we = 0, ps_rvalid, start, busy = 0, done = 0;
  logic [23:0] ps_addr = 0; logic [31:0] ps_wdata = 0, ps_rdata;
  layer_cfg_t cfg; data_t [N_PE-1:0] biases;
  logic fm_req, fm_we, fm_bank; logic [2:0] fm_map; logic [7:0] fm_addr;
  data_t fm_wdata, fm_rdata = '0;
  int n_start = 0;
  always @(posedge clk) if (rst_n && start) n_start++;

  dcnn_ps_if #(.N_PE(N_PE), .FDEPTH(FDEPTH)) dut (.*);

  task automatic chk(logic c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  task automatic wr(logic [23:0] a, logic [31:0] d);
    @(negedge clk); ps_req = 1; ps_we = 1; ps_addr = a; ps_wdata = d;
    @(negedge clk); ps_req = 0; ps_we = 0;
  endtask
  task automatic rd(logic [23:0] a, output logic [31:0] d);
    @(negedge clk); ps_req = 1; ps_we = 0; ps_addr = a;
    @(negedge clk); ps_req = 0;
    chk(ps_rvalid, "rvalid");
    d = ps_rdata;
  endtask

  initial begin
    logic [31:0] d;
    repeat (3) @(posedge clk); rst_n <= 1;
    wr(24'(REG_OP), 32'h71);
    wr(24'(REG_CH), {6'd0, 10'd384, 6'd0, 10'd256});
    wr(24'(REG_IN), {4'd0, 12'd13, 4'd0, 12'd15});
    wr(24'(REG_OUT), {4'd0, 12'd11, 4'd0, 12'd12});
    wr(24'(REG_KER), 32'h213);
    wr(24'(REG_DDR), 32'h1234_5600);
    chk(cfg.op == OP_POOL && cfg.src_bank && cfg.relu && cfg.groups2, "op fields");
    chk(cfg.in_ch == 256 && cfg.out_ch == 384, "channels");
    chk(cfg.in_w == 15 && cfg.in_h == 13 && cfg.out_w == 12 && cfg.out_h == 11, "sizes");
    chk(cfg.ksize == 3 && cfg.stride == 1 && cfg.pad == 2, "kernel");
    chk(cfg.ddr_base == 32'h1234_5600, "ddr base");
    rd(24'(REG_CH), d);  chk(d == {6'd0, 10'd384, 6'd0, 10'd256}, "read REG_CH");
    rd(24'(REG_DDR), d); chk(d == 32'h1234_5600, "read REG_DDR");
    for (int i = 0; i < N_PE; i++) wr({RGN_BIAS, 22'(i)}, 32'(i * 1000 - 3000));
    for (int i = 0; i < N_PE; i++) begin
      chk(int'(biases[i]) == i * 1000 - 3000, "bias reg");
      rd({RGN_BIAS, 22'(i)}, d); chk(int'(d) == i * 1000 - 3000, "bias read");
    end
    // feature-map write forwarding
    @(negedge clk); ps_req = 1; ps_we = 1; ps_addr = {RGN_FMAP, 1'b1, 9'd5, 12'd77}; ps_wdata = 32'h3_FFFF;
    #1 chk(fm_req && fm_we && fm_bank && fm_map == 5 && fm_addr == 77 && fm_wdata == 18'h3FFFF, "fm write");
    @(negedge clk); ps_req = 0; ps_we = 0;
    #1 chk(!fm_req, "fm_req drops");
    // feature-map read: data comes from fm_rdata one cycle later, sign extended
    @(negedge clk); ps_req = 1; ps_addr = {RGN_FMAP, 1'b0, 9'd2, 12'd9};
    #1 chk(fm_req && !fm_we && !fm_bank && fm_map == 2 && fm_addr == 9, "fm read");
    @(negedge clk); ps_req = 0; fm_rdata = data_t'(-5);
    #1 chk(ps_rvalid && ps_rdata == 32'hFFFF_FFFB, "fm read data");
    // start, busy, done
    wr(24'(REG_CTRL), 1);
    @(negedge clk);
    chk(n_start == 1, "start pulse");
    busy = 1;
    @(negedge clk); ps_req = 1; ps_addr = {RGN_FMAP, 22'd0};
    #1 chk(!ps_ready && !fm_req, "refused while busy");
    ps_req = 0;
    wr(24'(REG_DDR), 32'h0);
    chk(cfg.ddr_base == 32'h1234_5600, "config held while busy");
    wr(24'(REG_CTRL), 1);
    @(negedge clk);
    chk(n_start == 1, $sformatf("no start while busy %0d", n_start));
    rd(24'(REG_STATUS), d); chk(d == 32'h1, "status busy");
    @(negedge clk); busy = 0; done = 1;
    @(negedge clk); done = 0;
    rd(24'(REG_STATUS), d); chk(d == 32'h2, "status done");
    wr(24'(REG_CTRL), 1);
    rd(24'(REG_STATUS), d); chk(d == 32'h0, "done cleared by start");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
