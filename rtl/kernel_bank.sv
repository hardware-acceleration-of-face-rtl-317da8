// kernel_bank: the kernel memory bank, one memory block per filter.
//
// Before a layer (or a filter group) is computed, its weights are copied
// from DDR into this bank, filter f into block f. Writes come one weight per
// cycle (wr_en, wr_filter, wr_addr, wr_data). During convolution all blocks
// are read at the same address (the position within the receptive field),
// and rd_data presents every filter's weight one cycle after rd_en.
//
// One block per filter and 9-bit weights follow the reference design. The
// depth of 4096 words per block (one 36 Kb block RAM in its 4K x 9 shape) is
// this design's reading of the block-RAM count the reference design reports.
module kernel_bank
  import dcnn_pkg::*;
#(
  parameter int N_PE   = 384,
  parameter int KDEPTH = 4096
) (
  input  logic                      clk,
  input  logic                      wr_en,
  input  logic [$clog2(N_PE)-1:0]   wr_filter,
  input  logic [$clog2(KDEPTH)-1:0] wr_addr,
  input  weight_t                   wr_data,
  input  logic                      rd_en,
  input  logic [$clog2(KDEPTH)-1:0] rd_addr,
  output weight_t [N_PE-1:0]        rd_data
);

  for (genvar i = 0; i < N_PE; i++) begin : g_blk
    weight_t mem [KDEPTH];
    always_ff @(posedge clk) begin
      if (wr_en && wr_filter == i) mem[wr_addr] <= wr_data;
      if (rd_en) rd_data[i] <= mem[rd_addr];
    end
  end

endmodule
