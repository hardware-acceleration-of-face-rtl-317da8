// morph3x3: binary morphology with a 3x3 square structuring element.
//
// With DILATE = 0 it erodes (the output is 1 only when all nine window
// pixels are 1), with DILATE = 1 it dilates (1 when any is). Pixels outside
// the frame count as 0. An erosion followed by a dilation, an opening,
// removes skin regions thinner than three pixels while keeping the size of
// the rest. The window comes from window3x3; timing is described there plus
// one cycle. Morphological clean-up of the skin map follows the reference
// design; the choice of an opening with a 3x3 square is this design's.
module morph3x3 #(
  parameter int W      = 3840,
  parameter int H      = 2160,
  parameter bit DILATE = 1'b0
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
      out_pix   <= DILATE ? |win : &win;
    end
  end

endmodule
