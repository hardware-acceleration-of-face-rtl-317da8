// median3x3: 3x3 median filter of the binary skin map, which removes
// isolated pixels and fills small holes.
//
// For a binary image the median of nine values is their majority, so the
// output pixel is 1 when at least five of the nine window pixels are 1
// (pixels outside the frame count as 0). The window comes from window3x3;
// the output stream has the timing described there plus one cycle. The
// median filtering follows the reference design; the 3x3 size and the
// zero border are this design's choices.
module median3x3 #(
  parameter int W = 3840,
  parameter int H = 2160
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  logic in_pix,
  output logic out_valid,
  output logic out_pix
);

  logic win_valid;
  logic [8:0] win;

  window3x3 #(.W(W), .H(H)) u_win (
    .clk, .rst_n, .in_valid, .in_pix, .out_valid(win_valid), .out_win(win)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_pix   <= 1'b0;
    end else begin
      out_valid <= win_valid;
      out_pix   <= $countones(win) >= 5;
    end
  end

endmodule
