// ddr_reader: copies the kernels of a layer (or of one filter group) from
// external DDR memory into the kernel bank.
//
// In DDR the weights of consecutive filters lie one after another, each
// filter as wpf words in (channel, row, column) order, packed WPB = 8 to a
// 128-bit beat in 16-bit lanes (lane 0 in the low bits, weight in the low 9
// bits of its lane). After start the reader requests the ceil(nf*wpf/8)
// beats in bursts of up to MAX_BURST beats over an AXI4-style read channel
// (one burst outstanding), unpacks each beat at one weight per cycle and
// writes weight j of filter f0+k into kernel block f0+k at address j. done
// pulses for one cycle after the last weight is written.
//
// That kernels live in DDR and are buffered into the kernel bank before a
// layer is computed follows the reference design; the data layout, bus
// protocol and burst length are this design's choices. base must be
// 256-byte aligned so that no burst crosses a 4 KB boundary.
module ddr_reader
  import dcnn_pkg::*;
#(
  parameter int N_PE      = 384,
  parameter int KDEPTH    = 4096,
  parameter int MAX_BURST = 16
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // command
  input  logic                      start,
  input  logic [31:0]               base,
  input  logic [$clog2(N_PE)-1:0]   f0,
  input  logic [$clog2(N_PE):0]     nf,
  input  logic [$clog2(KDEPTH):0]   wpf,
  output logic                      busy,
  output logic                      done,
  // DDR read channel
  output logic                      ar_valid,
  input  logic                      ar_ready,
  output logic [31:0]               ar_addr,
  output logic [7:0]                ar_len,
  input  logic                      r_valid,
  output logic                      r_ready,
  input  logic [DDR_W-1:0]          r_data,
  input  logic                      r_last,
  // kernel bank write port
  output logic                      k_wr_en,
  output logic [$clog2(N_PE)-1:0]   k_wr_filter,
  output logic [$clog2(KDEPTH)-1:0] k_wr_addr,
  output weight_t                   k_wr_data
);

  localparam int TW = $clog2(N_PE) + $clog2(KDEPTH) + 2;

  logic [TW-1:0]      words_left;   // weights still to write
  logic [TW-1:0]      beats_left;   // beats still to request
  logic               burst_open;   // a burst has been requested and not finished
  logic [DDR_W-1:0]   beat;
  logic               have_beat;
  logic [$clog2(WPB)-1:0] lane;
  logic [$clog2(KDEPTH):0] j;
  logic [$clog2(N_PE)-1:0] f;
  logic [$clog2(KDEPTH):0] wpf_q;

  logic [TW-1:0] total;
  always_comb total = TW'(nf) * TW'(wpf);

  always_comb begin
    ar_valid = busy && !burst_open && beats_left != 0;
    ar_len   = (beats_left > TW'(MAX_BURST)) ? 8'(MAX_BURST - 1) : 8'(beats_left - 1);
    r_ready  = !have_beat;
    k_wr_en     = have_beat;
    k_wr_filter = f;
    k_wr_addr   = j[$clog2(KDEPTH)-1:0];
    k_wr_data   = weight_t'(beat[16*lane +: W_BITS]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; burst_open <= 1'b0; have_beat <= 1'b0;
      words_left <= '0; beats_left <= '0; lane <= '0; j <= '0; f <= '0;
      wpf_q <= '0; ar_addr <= '0; beat <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy       <= (total != 0);
        done       <= (total == 0);
        words_left <= total;
        beats_left <= (total + TW'(WPB - 1)) / TW'(WPB);
        ar_addr    <= base;
        f <= f0; j <= '0; wpf_q <= wpf; lane <= '0;
      end
      if (ar_valid && ar_ready) begin
        burst_open <= 1'b1;
        beats_left <= beats_left - (TW'(ar_len) + 1);
        ar_addr    <= ar_addr + 32'((32'(ar_len) + 1) * (DDR_W / 8));
      end
      if (r_valid && r_ready) begin
        beat      <= r_data;
        have_beat <= 1'b1;
        lane      <= '0;
        if (r_last) burst_open <= 1'b0;
      end
      if (have_beat) begin
        lane       <= lane + 1'b1;
        words_left <= words_left - 1'b1;
        if (j == wpf_q - 1) begin
          j <= '0;
          f <= f + 1'b1;
        end else begin
          j <= j + 1'b1;
        end
        if (lane == $clog2(WPB)'(WPB - 1) || words_left == 1) have_beat <= 1'b0;
        if (words_left == 1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

endmodule
