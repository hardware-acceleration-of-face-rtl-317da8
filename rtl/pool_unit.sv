// pool_unit: the pooling (sub-sampling) unit, one max lane per channel.
//
// For each output pixel the controller reads the pixels of the pooling
// window one per cycle, all channels in parallel from the feature-map bank.
// Each lane keeps the running maximum: in_first restarts it, in_last ends
// the window, and one cycle later out_valid is high with every lane's
// maximum on out_data, ready to be written to the free bank in one cycle.
//
// Channel-parallel sub-sampling over a context follows the reference design;
// the use of the maximum (as in the AlexNet network the classifier was
// derived from) is this design's choice.
module pool_unit
  import dcnn_pkg::*;
#(
  parameter int N_CH = 384
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  logic               in_first,
  input  logic               in_last,
  input  data_t [N_CH-1:0]   in_data,
  output logic               out_valid,
  output data_t [N_CH-1:0]   out_data
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= in_valid && in_last;
      if (in_valid) begin
        for (int i = 0; i < N_CH; i++) begin
          if (in_first || in_data[i] > out_data[i]) out_data[i] <= in_data[i];
        end
      end
    end
  end

endmodule
