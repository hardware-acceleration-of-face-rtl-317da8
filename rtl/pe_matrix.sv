// pe_matrix: the processing-element matrix, N_PE MACC units, one per filter.
//
// All PEs see the same serial input pixel (broadcast) and each takes its own
// weight from the kernel memory of its filter and its own bias register.
// After the last pixel of a receptive field every PE delivers its result at
// the same time, so one output pixel of up to N_PE output maps is produced in
// parallel. Only PEs whose bit in pe_en is set accumulate; the others hold
// (filter grouping leaves some of them idle).
//
// Interface timing is that of dcnn_pe: results are valid one cycle after
// in_last. N_PE = 384 matches the 384 DSP blocks the reference implementation
// uses with one DSP per PE; the figure of the architecture draws the PEs as a
// grid, which has no function here beyond the count.
module pe_matrix
  import dcnn_pkg::*;
#(
  parameter int N_PE = 384
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  logic               in_first,
  input  logic               in_last,
  input  data_t              in_data,
  input  weight_t [N_PE-1:0] weights,
  input  data_t   [N_PE-1:0] biases,
  input  logic    [N_PE-1:0] pe_en,
  input  logic               relu,
  output logic    [N_PE-1:0] out_valid,
  output data_t   [N_PE-1:0] out_data
);

  for (genvar i = 0; i < N_PE; i++) begin : g_pe
    dcnn_pe u_pe (
      .clk,
      .rst_n,
      .in_valid (in_valid && pe_en[i]),
      .in_first,
      .in_last,
      .in_data,
      .in_weight(weights[i]),
      .bias     (biases[i]),
      .relu,
      .out_valid(out_valid[i]),
      .out_data (out_data[i])
    );
  end

endmodule
