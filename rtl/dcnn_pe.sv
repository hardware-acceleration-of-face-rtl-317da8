// dcnn_pe: one processing element of the DCNN accelerator, a MACC for one
// filter.
//
// Input pixels of the receptive field arrive one per cycle (in_valid) with
// the matching weight from this filter's kernel memory. On the first pixel
// of a field (in_first) the accumulator starts from the bias, aligned to the
// product's 14 fraction bits; on every other one it adds the product. The
// cycle after in_last, out_valid is high for one cycle and out_data holds the
// sum shifted back to 7 fraction bits, optionally clamped at zero (ReLU) and
// saturated to 18 bits (relu is sampled with in_last). A new field may begin in that same cycle, so fields
// follow each other without a gap.
//
// Multiply-accumulate with a bias term follows the reference design (one DSP
// per PE); the 48-bit accumulator, truncating shift, saturation and optional
// ReLU are this design's choices.
module dcnn_pe
  import dcnn_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  logic    in_first,
  input  logic    in_last,
  input  data_t   in_data,
  input  weight_t in_weight,
  input  data_t   bias,
  input  logic    relu,
  output logic    out_valid,
  output data_t   out_data
);

  logic signed [ACC_BITS-1:0] acc, prod, base;
  logic relu_q;   // ReLU setting of the field being delivered

  always_comb begin
    prod = ACC_BITS'(in_data) * ACC_BITS'(in_weight);
    base = in_first ? (ACC_BITS'(bias) <<< FRAC) : acc;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc       <= '0;
      out_valid <= 1'b0;
      relu_q    <= 1'b0;
    end else begin
      out_valid <= in_valid && in_last;
      if (in_valid && in_last) relu_q <= relu;
      if (in_valid) acc <= base + prod;
    end
  end

  logic signed [ACC_BITS-1:0] shifted;
  always_comb begin
    shifted  = acc >>> FRAC;
    if (relu_q && shifted < 0) shifted = '0;
    out_data = sat_data(shifted);
  end

endmodule
