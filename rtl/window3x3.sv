// window3x3: 3x3 neighbourhood generator for a binary raster stream, used
// by the median and morphological filters.
//
// Pixels of a W x H frame arrive in raster order, one per cycle when
// in_valid is high. Two line buffers hold the previous two rows. For every
// pixel the window centred on it is produced, with zeros outside the frame,
// one row and one column after the centre pixel arrives. To produce the last
// column and the last row, the generator inserts a zero padding pixel by
// itself after the last pixel of each line (one cycle) and a padding row of
// W+1 pixels after the last line. The source must therefore leave in_valid
// low in the cycle after each line's last pixel and for at least W+2 cycles
// after a frame's last pixel; video blanking is much longer than both.
//
// out_win bit 3*r+c is row r (0 = top) and column c (0 = left) of the
// window; out_valid marks a window, in raster order of its centre.
// This helper is this design's own; the filters built on it are the
// reference design's.
module window3x3 #(
  parameter int W = 3840,
  parameter int H = 2160
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic       in_pix,
  output logic       out_valid,
  output logic [8:0] out_win
);

  typedef enum logic [1:0] {RUN, PADC, PADR} state_e;
  state_e state;

  logic [$clog2(W+1)-1:0] x;
  logic [$clog2(H+1)-1:0] y;
  logic lb1 [W];   // row y-1
  logic lb2 [W];   // row y-2
  logic c1_t, c1_m, c1_b, c2_t, c2_m, c2_b;   // columns x-2 and x-1

  logic step, p, top, mid;
  always_comb begin
    step = (state == RUN) ? in_valid : 1'b1;
    p    = (state == RUN) ? in_pix : 1'b0;
    top  = (y >= 2 && int'(x) < W) ? lb2[x] : 1'b0;
    mid  = (y >= 1 && int'(x) < W) ? lb1[x] : 1'b0;
  end

  always_ff @(posedge clk) begin
    if (step && int'(x) < W) begin
      lb2[x] <= lb1[x];
      lb1[x] <= p;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= RUN; x <= '0; y <= '0; out_valid <= 1'b0; out_win <= '0;
      {c1_t, c1_m, c1_b, c2_t, c2_m, c2_b} <= '0;
    end else begin
      out_valid <= step && x >= 1 && y >= 1;
      out_win   <= {p, c2_b, c1_b, mid, c2_m, c1_m, top, c2_t, c1_t};
      if (step) begin
        {c2_t, c2_m, c2_b} <= {top, mid, p};
        if (x == 0) {c1_t, c1_m, c1_b} <= '0;
        else        {c1_t, c1_m, c1_b} <= {c2_t, c2_m, c2_b};
        unique case (state)
          RUN: begin
            x <= x + 1'b1;
            if (int'(x) == W - 1) state <= PADC;
          end
          PADC: begin
            x <= '0;
            if (int'(y) == H - 1) begin y <= y + 1'b1; state <= PADR; end
            else begin y <= y + 1'b1; state <= RUN; end
          end
          PADR: begin
            if (int'(x) == W) begin x <= '0; y <= '0; state <= RUN; end
            else x <= x + 1'b1;
          end
          default: state <= RUN;
        endcase
      end
    end
  end

  // the source keeps quiet while padding pixels are inserted
  a_no_input_while_padding: assert property (@(posedge clk) disable iff (!rst_n)
    state != RUN |-> !in_valid);

endmodule
