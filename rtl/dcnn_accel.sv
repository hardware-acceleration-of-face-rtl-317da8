// dcnn_accel: the DCNN accelerator in programmable logic, which computes the
// convolutional and pooling layers of the face classifier.
//
// It holds a kernel bank (one memory per filter), two feature-map banks used
// in ping-pong (one memory per map), a matrix of N_PE multiply-accumulate
// PEs (one per filter), a channel-parallel max-pooling unit, a reader that
// copies kernels from external DDR, the PS bus interface with the bias
// registers, and the controlling state machine. The PS writes the network
// input into a bank, then for each layer writes the layer registers and
// starts it; irq pulses when the layer is done, and after the last layer the
// PS reads the maps back for the fully connected layers it computes itself.
//
// Datapath timing: S0 the controller issues a read of one input pixel (and,
// for convolution, the matching weight of every filter); S1 the memories
// deliver, the selected channel (or zero for padding) is broadcast to the
// PEs, or all channels go to the pooling unit; S2 the results of all maps
// are written to the other bank in one cycle. One pixel enters per cycle
// with no bubbles between output pixels. While a layer runs, PS accesses
// to the feature maps are refused. The structure follows the reference
// design; the pipeline, the ping-pong rule (a layer always writes the bank
// it does not read) and the bus protocols are this design's choices.
module dcnn_accel
  import dcnn_pkg::*;
#(
  parameter int N_PE   = 384,
  parameter int KDEPTH = 4096,
  parameter int FDEPTH = 1024
) (
  input  logic              clk,
  input  logic              rst_n,
  // PS bus
  input  logic              ps_req,
  output logic              ps_ready,
  input  logic              ps_we,
  input  logic [23:0]       ps_addr,
  input  logic [31:0]       ps_wdata,
  output logic              ps_rvalid,
  output logic [31:0]       ps_rdata,
  output logic              irq,
  // DDR read channel
  output logic              ddr_ar_valid,
  input  logic              ddr_ar_ready,
  output logic [31:0]       ddr_ar_addr,
  output logic [7:0]        ddr_ar_len,
  input  logic              ddr_r_valid,
  output logic              ddr_r_ready,
  input  logic [DDR_W-1:0]  ddr_r_data,
  input  logic              ddr_r_last
);

  localparam int MW = $clog2(N_PE);
  localparam int FW = $clog2(FDEPTH);
  localparam int KW = $clog2(KDEPTH);

  layer_cfg_t cfg;
  logic start, busy, done;
  data_t [N_PE-1:0] biases;
  logic fm_req, fm_we, fm_bank;
  logic [MW-1:0] fm_map;
  logic [FW-1:0] fm_addr;
  data_t fm_wdata, fm_rdata;

  dcnn_ps_if #(.N_PE(N_PE), .FDEPTH(FDEPTH)) u_ps_if (
    .clk, .rst_n, .ps_req, .ps_ready, .ps_we, .ps_addr, .ps_wdata, .ps_rvalid, .ps_rdata,
    .cfg, .start, .busy, .done, .biases,
    .fm_req, .fm_we, .fm_bank, .fm_map, .fm_addr, .fm_wdata, .fm_rdata
  );
  assign irq = done;

  // controller
  logic ld_start, ld_done;
  logic [31:0] ld_base;
  logic [MW-1:0] ld_f0;
  logic [MW:0] ld_nf;
  logic [KW:0] ld_wpf;
  logic iss_valid, iss_pool, iss_first, iss_last, iss_pad;
  logic [MW-1:0] iss_ch;
  logic [FW-1:0] iss_rd_addr, iss_wr_addr;
  logic [KW-1:0] iss_k_addr;
  logic [N_PE-1:0] pe_en, ch_en;

  dcnn_ctrl #(.N_PE(N_PE), .KDEPTH(KDEPTH), .FDEPTH(FDEPTH)) u_ctrl (
    .clk, .rst_n, .cfg, .start, .busy, .done,
    .ld_start, .ld_base, .ld_f0, .ld_nf, .ld_wpf, .ld_done,
    .iss_valid, .iss_pool, .iss_first, .iss_last, .iss_pad, .iss_ch,
    .iss_rd_addr, .iss_k_addr, .iss_wr_addr, .pe_en, .ch_en
  );

  // kernels
  logic k_wr_en;
  logic [MW-1:0] k_wr_filter;
  logic [KW-1:0] k_wr_addr;
  weight_t k_wr_data;
  weight_t [N_PE-1:0] weights;
  logic ld_busy;

  ddr_reader #(.N_PE(N_PE), .KDEPTH(KDEPTH)) u_ddr_reader (
    .clk, .rst_n, .start(ld_start), .base(ld_base), .f0(ld_f0), .nf(ld_nf), .wpf(ld_wpf),
    .busy(ld_busy), .done(ld_done),
    .ar_valid(ddr_ar_valid), .ar_ready(ddr_ar_ready), .ar_addr(ddr_ar_addr), .ar_len(ddr_ar_len),
    .r_valid(ddr_r_valid), .r_ready(ddr_r_ready), .r_data(ddr_r_data), .r_last(ddr_r_last),
    .k_wr_en, .k_wr_filter, .k_wr_addr, .k_wr_data
  );

  kernel_bank #(.N_PE(N_PE), .KDEPTH(KDEPTH)) u_kernel_bank (
    .clk, .wr_en(k_wr_en), .wr_filter(k_wr_filter), .wr_addr(k_wr_addr), .wr_data(k_wr_data),
    .rd_en(iss_valid && !iss_pool), .rd_addr(iss_k_addr), .rd_data(weights)
  );

  // feature-map banks
  logic [1:0]            b_rd_en;
  logic [FW-1:0]         b_rd_addr [2];
  data_t [N_PE-1:0]      b_rd_data [2];
  logic [N_PE-1:0]       b_wr_en   [2];
  logic [FW-1:0]         b_wr_addr;
  data_t [N_PE-1:0]      b_wr_data;

  for (genvar b = 0; b < 2; b++) begin : g_bank
    fmap_bank #(.N_MAP(N_PE), .FDEPTH(FDEPTH)) u_bank (
      .clk, .rd_en(b_rd_en[b]), .rd_addr(b_rd_addr[b]), .rd_data(b_rd_data[b]),
      .wr_en(b_wr_en[b]), .wr_addr(b_wr_addr), .wr_data(b_wr_data)
    );
  end

  // S1 / S2 pipeline registers
  logic s1_valid, s1_pool, s1_first, s1_last, s1_pad;
  logic [MW-1:0] s1_ch, fm_map_q;
  logic [FW-1:0] s1_wr_addr, s2_wr_addr;
  logic fm_bank_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0; s1_pool <= 1'b0; s1_first <= 1'b0; s1_last <= 1'b0; s1_pad <= 1'b0;
      s1_ch <= '0; s1_wr_addr <= '0; s2_wr_addr <= '0; fm_map_q <= '0; fm_bank_q <= 1'b0;
    end else begin
      s1_valid   <= iss_valid;
      s1_pool    <= iss_pool;
      s1_first   <= iss_first;
      s1_last    <= iss_last;
      s1_pad     <= iss_pad;
      s1_ch      <= iss_ch;
      s1_wr_addr <= iss_wr_addr;
      s2_wr_addr <= s1_wr_addr;
      if (fm_req && !fm_we) begin
        fm_map_q  <= fm_map;
        fm_bank_q <= fm_bank;
      end
    end
  end

  logic src;
  always_comb src = cfg.src_bank;

  data_t [N_PE-1:0] src_data;
  data_t pe_in;
  always_comb begin
    src_data = b_rd_data[src];
    pe_in    = s1_pad ? data_t'(0) : src_data[s1_ch];
    fm_rdata = b_rd_data[fm_bank_q][fm_map_q];
  end

  logic [N_PE-1:0] pe_valid;
  data_t [N_PE-1:0] pe_out, pool_out;
  logic pool_valid;

  pe_matrix #(.N_PE(N_PE)) u_pe_matrix (
    .clk, .rst_n,
    .in_valid(s1_valid && !s1_pool), .in_first(s1_first), .in_last(s1_last),
    .in_data(pe_in), .weights, .biases, .pe_en, .relu(cfg.relu),
    .out_valid(pe_valid), .out_data(pe_out)
  );

  pool_unit #(.N_CH(N_PE)) u_pool (
    .clk, .rst_n,
    .in_valid(s1_valid && s1_pool), .in_first(s1_first), .in_last(s1_last),
    .in_data(src_data), .out_valid(pool_valid), .out_data(pool_out)
  );

  // bank port multiplexing: the controller while busy, the PS otherwise
  always_comb begin
    for (int b = 0; b < 2; b++) begin
      if (busy) begin
        b_rd_en[b]   = iss_valid && (b == int'(src));
        b_rd_addr[b] = iss_rd_addr;
        b_wr_en[b]   = '0;
        if (b != int'(src)) b_wr_en[b] = pool_valid ? ch_en : (pe_valid & pe_en);
      end else begin
        b_rd_en[b]   = fm_req && !fm_we && (b == int'(fm_bank));
        b_rd_addr[b] = fm_addr;
        b_wr_en[b]   = '0;
        if (fm_req && fm_we && b == int'(fm_bank)) b_wr_en[b][fm_map] = 1'b1;
      end
    end
    if (busy) begin
      b_wr_addr = s2_wr_addr;
      b_wr_data = pool_valid ? pool_out : pe_out;
    end else begin
      b_wr_addr = fm_addr;
      b_wr_data = {N_PE{fm_wdata}};
    end
  end

  // A kernel load runs only inside a layer, and no pixel is issued while the
  // kernel bank is being written.
  a_load_in_layer: assert property (@(posedge clk) disable iff (!rst_n) ld_busy |-> busy);
  a_no_issue_during_load: assert property (@(posedge clk) disable iff (!rst_n) ld_busy |-> !iss_valid);

endmodule
