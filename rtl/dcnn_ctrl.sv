// dcnn_ctrl: the state machine that runs one layer of the DCNN accelerator.
//
// Convolution (OP_CONV). The layer runs as one pass, or as two passes when
// filter grouping is on: pass g uses input channels g*C/2 .. (g+1)*C/2-1 and
// filters g*F/2 .. (g+1)*F/2-1, the other half of the PEs stays idle. Each
// pass first has the DDR reader copy the pass's kernels into the kernel
// bank (group 1's kernels start at the first 256-byte boundary after group
// 0's), then issues one receptive-field pixel per cycle: for every output
// pixel (oy, ox) it walks channel c, kernel row ky and column kx, reading
// input map c0+c of the source bank at (oy*S+ky-P, ox*S+kx-P) (pad = 1 and
// no read outside the map) and kernel word (c*K+ky)*K+kx of every filter.
// first/last mark the field; wr_addr = oy*out_w+ox is where the results go.
// A pass therefore takes out_h*out_w*(C/G)*K*K issue cycles plus the load.
//
// Pooling (OP_POOL). For every output pixel it walks the K x K window at
// stride S, reading all channels in parallel; no kernel load.
//
// All outputs describe issue stage S0. The accelerator registers them to
// match the one-cycle memory latency (S1, MAC or max) and writes the result
// a cycle later (S2); the controller waits DRAIN cycles for that before it
// pulses done. Loading kernels from DDR per layer, filter grouping into two
// halves, one PE per filter and channel-parallel pooling follow the
// reference design; the loop order and the command format are this
// design's choices.
module dcnn_ctrl
  import dcnn_pkg::*;
#(
  parameter int N_PE   = 384,
  parameter int KDEPTH = 4096,
  parameter int FDEPTH = 1024
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  layer_cfg_t                cfg,
  input  logic                      start,
  output logic                      busy,
  output logic                      done,
  // DDR reader command
  output logic                      ld_start,
  output logic [31:0]               ld_base,
  output logic [$clog2(N_PE)-1:0]   ld_f0,
  output logic [$clog2(N_PE):0]     ld_nf,
  output logic [$clog2(KDEPTH):0]   ld_wpf,
  input  logic                      ld_done,
  // issue stage
  output logic                      iss_valid,
  output logic                      iss_pool,   // 1: pooling, 0: convolution
  output logic                      iss_first,
  output logic                      iss_last,
  output logic                      iss_pad,
  output logic [$clog2(N_PE)-1:0]   iss_ch,
  output logic [$clog2(FDEPTH)-1:0] iss_rd_addr,
  output logic [$clog2(KDEPTH)-1:0] iss_k_addr,
  output logic [$clog2(FDEPTH)-1:0] iss_wr_addr,
  output logic [N_PE-1:0]           pe_en,
  output logic [N_PE-1:0]           ch_en       // maps written by pooling
);

  localparam int DRAIN = 3;

  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_LOADW, S_RUN, S_DRAIN} state_e;
  state_e state;

  layer_cfg_t c_q;
  logic        grp;
  logic [11:0] oy, ox;
  logic [9:0]  ch;
  logic [3:0]  ky, kx;
  logic [$clog2(KDEPTH)-1:0] kidx;
  logic [$clog2(FDEPTH)-1:0] opix;
  logic [1:0]  drain_cnt;

  logic [9:0] gch, gflt, c0, f0;
  logic [$clog2(KDEPTH):0] wpf;
  always_comb begin
    gch  = c_q.groups2 ? (c_q.in_ch >> 1)  : c_q.in_ch;
    gflt = c_q.groups2 ? (c_q.out_ch >> 1) : c_q.out_ch;
    c0   = grp ? gch  : 10'd0;
    f0   = grp ? gflt : 10'd0;
    wpf  = ($clog2(KDEPTH)+1)'(gch * c_q.ksize * c_q.ksize);
  end

  // group 1's kernels start at the next 256-byte boundary after group 0's
  logic [31:0] g1_off;
  always_comb g1_off = ((32'(gflt) * 32'(wpf) + 32'd127) >> 7) << 8;

  always_comb begin
    ld_start = state == S_LOAD;
    ld_base  = c_q.ddr_base + (grp ? g1_off : 32'd0);
    ld_f0    = $clog2(N_PE)'(f0);
    ld_nf    = ($clog2(N_PE)+1)'(gflt);
    ld_wpf   = wpf;
  end

  // input coordinates of the current issue
  logic signed [15:0] iy, ix;
  always_comb begin
    iy = signed'(16'(oy) * 16'(c_q.stride)) + 16'(ky) - (c_q.op == OP_CONV ? 16'(c_q.pad) : 16'd0);
    ix = signed'(16'(ox) * 16'(c_q.stride)) + 16'(kx) - (c_q.op == OP_CONV ? 16'(c_q.pad) : 16'd0);
  end

  logic last_k, last_c, last_x, last_y;
  always_comb begin
    last_k = (kx == c_q.ksize - 1) && (ky == c_q.ksize - 1);
    last_c = (c_q.op == OP_POOL) || (ch == gch - 1);
    last_x = ox == c_q.out_w - 1;
    last_y = oy == c_q.out_h - 1;

    iss_valid   = state == S_RUN;
    iss_pool    = c_q.op == OP_POOL;
    iss_first   = (kx == 0) && (ky == 0) && (ch == 0);
    iss_last    = last_k && last_c;
    iss_pad     = iy < 0 || ix < 0 || iy >= signed'(16'(c_q.in_h)) || ix >= signed'(16'(c_q.in_w));
    iss_ch      = $clog2(N_PE)'(c0 + ch);
    iss_rd_addr = $clog2(FDEPTH)'(32'(iy) * 32'(c_q.in_w) + 32'(ix));
    iss_k_addr  = kidx;
    iss_wr_addr = opix;
    for (int i = 0; i < N_PE; i++) begin
      pe_en[i] = (i >= int'(f0)) && (i < int'(f0) + int'(gflt));
      ch_en[i] = i < int'(c_q.in_ch);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; c_q <= '0; grp <= 1'b0; busy <= 1'b0; done <= 1'b0;
      oy <= '0; ox <= '0; ch <= '0; ky <= '0; kx <= '0; kidx <= '0; opix <= '0;
      drain_cnt <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          c_q  <= cfg;
          grp  <= 1'b0;
          busy <= 1'b1;
          state <= (cfg.op == OP_POOL) ? S_RUN : S_LOAD;
          oy <= '0; ox <= '0; ch <= '0; ky <= '0; kx <= '0; kidx <= '0; opix <= '0;
        end
        S_LOAD:  state <= S_LOADW;
        S_LOADW: if (ld_done) state <= S_RUN;
        S_RUN: begin
          // innermost kx, then ky, then channel, then ox, then oy
          kidx <= kidx + 1'b1;
          if (kx != c_q.ksize - 1) kx <= kx + 1'b1;
          else begin
            kx <= '0;
            if (ky != c_q.ksize - 1) ky <= ky + 1'b1;
            else begin
              ky <= '0;
              if (!last_c) ch <= ch + 1'b1;
              else begin
                ch   <= '0;
                kidx <= '0;
                opix <= opix + 1'b1;
                if (!last_x) ox <= ox + 1'b1;
                else begin
                  ox <= '0;
                  if (!last_y) oy <= oy + 1'b1;
                  else begin
                    oy <= '0;
                    opix <= '0;
                    state <= S_DRAIN;
                    drain_cnt <= '0;
                  end
                end
              end
            end
          end
        end
        S_DRAIN: begin
          drain_cnt <= drain_cnt + 1'b1;
          if (drain_cnt == 2'(DRAIN - 1)) begin
            if (c_q.op == OP_CONV && c_q.groups2 && !grp) begin
              grp   <= 1'b1;
              state <= S_LOAD;
            end else begin
              state <= S_IDLE;
              busy  <= 1'b0;
              done  <= 1'b1;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
