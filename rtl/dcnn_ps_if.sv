// dcnn_ps_if: the accelerator's port to the processing system (PS).
//
// A simple word-addressed bus (req/ready, we, 24-bit address, 32-bit data;
// read data returns with rvalid one cycle after the request is accepted)
// gives the PS access to three regions, selected by addr[23:22]:
//   0  control and layer-configuration registers (see dcnn_pkg REG_*);
//      writing bit 0 of REG_CTRL starts the configured layer; register
//      writes are ignored while a layer runs;
//   1  the bias registers, one 18-bit value per filter (offset = filter);
//   2  the feature-map memories of both banks: addr[21] bank, addr[20:12]
//      map, addr[11:0] word. The PS writes the scaled candidate area here as
//      the network input and reads the last layer's maps back. These
//      accesses are forwarded on the fm_* port and are refused (ready low)
//      while the accelerator is busy.
// The biases kept in registers and the PS being able to write inputs and
// read results follow the reference design; the bus, the address map and
// the register layout are this design's choices.
module dcnn_ps_if
  import dcnn_pkg::*;
#(
  parameter int N_PE   = 384,
  parameter int FDEPTH = 1024
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // PS bus
  input  logic                      ps_req,
  output logic                      ps_ready,
  input  logic                      ps_we,
  input  logic [23:0]               ps_addr,
  input  logic [31:0]               ps_wdata,
  output logic                      ps_rvalid,
  output logic [31:0]               ps_rdata,
  // to the controller
  output layer_cfg_t                cfg,
  output logic                      start,
  input  logic                      busy,
  input  logic                      done,
  output data_t [N_PE-1:0]          biases,
  // feature-map access
  output logic                      fm_req,
  output logic                      fm_we,
  output logic                      fm_bank,
  output logic [$clog2(N_PE)-1:0]   fm_map,
  output logic [$clog2(FDEPTH)-1:0] fm_addr,
  output data_t                     fm_wdata,
  input  data_t                     fm_rdata
);

  logic [1:0] rgn;
  logic       acc, rd_is_fmap, done_flag;
  logic [31:0] reg_rdata;

  always_comb begin
    rgn      = ps_addr[23:22];
    ps_ready = !(rgn == RGN_FMAP && busy);
    acc      = ps_req && ps_ready;
    fm_req   = acc && rgn == RGN_FMAP;
    fm_we    = ps_we;
    fm_bank  = ps_addr[21];
    fm_map   = ps_addr[12 +: $clog2(N_PE)];
    fm_addr  = ps_addr[0 +: $clog2(FDEPTH)];
    fm_wdata = data_t'(ps_wdata);
    ps_rdata = rd_is_fmap ? 32'(signed'(fm_rdata)) : reg_rdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg        <= '0;
      start      <= 1'b0;
      done_flag  <= 1'b0;
      ps_rvalid  <= 1'b0;
      rd_is_fmap <= 1'b0;
      reg_rdata  <= '0;
      biases     <= '0;
    end else begin
      start     <= 1'b0;
      ps_rvalid <= acc && !ps_we;
      rd_is_fmap <= rgn == RGN_FMAP;
      if (done) done_flag <= 1'b1;
      if (acc && ps_we) begin
        if (rgn == RGN_REG && !busy) begin
          unique case (ps_addr[7:0])
            REG_CTRL: if (ps_wdata[0]) begin
              start     <= 1'b1;
              done_flag <= 1'b0;
            end
            REG_OP: begin
              cfg.op       <= op_e'(ps_wdata[1:0]);
              cfg.src_bank <= ps_wdata[4];
              cfg.relu     <= ps_wdata[5];
              cfg.groups2  <= ps_wdata[6];
            end
            REG_CH:  begin cfg.in_ch <= ps_wdata[9:0];  cfg.out_ch <= ps_wdata[25:16]; end
            REG_IN:  begin cfg.in_w  <= ps_wdata[11:0]; cfg.in_h   <= ps_wdata[27:16]; end
            REG_OUT: begin cfg.out_w <= ps_wdata[11:0]; cfg.out_h  <= ps_wdata[27:16]; end
            REG_KER: begin
              cfg.ksize  <= ps_wdata[3:0];
              cfg.stride <= ps_wdata[7:4];
              cfg.pad    <= ps_wdata[11:8];
            end
            REG_DDR: cfg.ddr_base <= ps_wdata;
            default: ;
          endcase
        end else if (rgn == RGN_BIAS && ps_addr[21:0] < 22'(N_PE)) begin
          biases[ps_addr[$clog2(N_PE)-1:0]] <= data_t'(ps_wdata);
        end
      end
      if (acc && !ps_we) begin
        reg_rdata <= '0;
        if (rgn == RGN_REG) begin
          unique case (ps_addr[7:0])
            REG_STATUS: reg_rdata <= {30'd0, done_flag, busy};
            REG_OP:     reg_rdata <= {25'd0, cfg.groups2, cfg.relu, cfg.src_bank, 2'd0, cfg.op};
            REG_CH:     reg_rdata <= {6'd0, cfg.out_ch, 6'd0, cfg.in_ch};
            REG_IN:     reg_rdata <= {4'd0, cfg.in_h, 4'd0, cfg.in_w};
            REG_OUT:    reg_rdata <= {4'd0, cfg.out_h, 4'd0, cfg.out_w};
            REG_KER:    reg_rdata <= {20'd0, cfg.pad, cfg.stride, cfg.ksize};
            REG_DDR:    reg_rdata <= cfg.ddr_base;
            default:    reg_rdata <= '0;
          endcase
        end else if (rgn == RGN_BIAS && ps_addr[21:0] < 22'(N_PE)) begin
          reg_rdata <= 32'(signed'(biases[ps_addr[$clog2(N_PE)-1:0]]));
        end
      end
    end
  end

endmodule
