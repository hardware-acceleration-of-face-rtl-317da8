// fmap_bank: one bank of feature-map memories, one memory block per map.
//
// The accelerator has two such banks and uses them in ping-pong: a layer
// reads its input maps from one and writes its output maps to the other. The
// read port reads every map at the same word address and presents all of
// them one cycle after rd_en (the convolution picks one channel, pooling uses
// all). The write port writes every map whose bit in wr_en is set, each with
// its own data, at one shared address: the PE matrix and the pooling unit
// write one pixel of all output maps in a single cycle.
//
// 18-bit words and one block per output map follow the reference design. The
// depth of 1024 words (a 1K x 18 block RAM) is this design's reading of the
// block-RAM count the reference design reports.
module fmap_bank
  import dcnn_pkg::*;
#(
  parameter int N_MAP  = 384,
  parameter int FDEPTH = 1024
) (
  input  logic                      clk,
  input  logic                      rd_en,
  input  logic [$clog2(FDEPTH)-1:0] rd_addr,
  output data_t [N_MAP-1:0]         rd_data,
  input  logic [N_MAP-1:0]          wr_en,
  input  logic [$clog2(FDEPTH)-1:0] wr_addr,
  input  data_t [N_MAP-1:0]         wr_data
);

  for (genvar i = 0; i < N_MAP; i++) begin : g_map
    data_t mem [FDEPTH];
    always_ff @(posedge clk) begin
      if (wr_en[i]) mem[wr_addr] <= wr_data[i];
      if (rd_en) rd_data[i] <= mem[rd_addr];
    end
  end

endmodule
