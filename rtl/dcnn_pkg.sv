// dcnn_pkg: number formats, layer descriptor and bus address map shared by the
// DCNN convolution/pooling accelerator.
//
// Weights are 9-bit two's complement fixed point with 7 fraction bits (sign,
// one integer bit, seven fraction bits). Feature-map values and biases are
// 18-bit two's complement with 7 fraction bits (sign, ten integer bits, seven
// fraction bits). Both formats follow the reference design; the 48-bit
// accumulator (the width of a DSP48 accumulator), the layer descriptor and
// the address map are this design's own choices.
package dcnn_pkg;

  localparam int W_BITS   = 9;   // kernel weight width
  localparam int D_BITS   = 18;  // feature map / bias width
  localparam int FRAC     = 7;   // fraction bits of both formats
  localparam int ACC_BITS = 48;  // MACC accumulator width
  localparam int DDR_W    = 128; // DDR read data width
  localparam int WPB      = DDR_W / 16; // weights per DDR beat (16-bit lanes)

  typedef logic signed [W_BITS-1:0] weight_t;
  typedef logic signed [D_BITS-1:0] data_t;

  typedef enum logic [1:0] {
    OP_CONV = 2'd0,   // load kernels, convolve source bank into the other bank
    OP_POOL = 2'd1    // max-pool source bank into the other bank
  } op_e;

  // One layer command, written by the processing system before START.
  typedef struct packed {
    op_e          op;
    logic         src_bank;   // bank read; the result goes to the other one
    logic         relu;       // clamp negative convolution results to zero
    logic         groups2;    // filter grouping: two groups of channels/filters
    logic [9:0]   in_ch;      // input channels (whole layer)
    logic [9:0]   out_ch;     // filters (whole layer)
    logic [11:0]  in_h, in_w; // input map size
    logic [11:0]  out_h, out_w; // output map size
    logic [3:0]   ksize;      // convolution kernel or pooling window side
    logic [3:0]   stride;
    logic [3:0]   pad;        // zero padding (convolution only)
    logic [31:0]  ddr_base;   // byte address of the layer's kernels in DDR
  } layer_cfg_t;

  // Processing-system bus: 32-bit data, word addresses. addr[23:22] selects
  // the region.
  localparam logic [1:0] RGN_REG  = 2'd0; // control and configuration
  localparam logic [1:0] RGN_BIAS = 2'd1; // bias register i at offset i
  localparam logic [1:0] RGN_FMAP = 2'd2; // feature maps: [21] bank, [20:12] map, [11:0] word

  // Register offsets within RGN_REG
  localparam logic [7:0] REG_CTRL   = 8'h00; // write bit0 = start
  localparam logic [7:0] REG_STATUS = 8'h01; // bit0 busy, bit1 done (sticky, cleared by start)
  localparam logic [7:0] REG_OP     = 8'h02; // [1:0] op, [4] src_bank, [5] relu, [6] groups2
  localparam logic [7:0] REG_CH     = 8'h03; // [9:0] in_ch, [25:16] out_ch
  localparam logic [7:0] REG_IN     = 8'h04; // [11:0] in_w, [27:16] in_h
  localparam logic [7:0] REG_OUT    = 8'h05; // [11:0] out_w, [27:16] out_h
  localparam logic [7:0] REG_KER    = 8'h06; // [3:0] ksize, [7:4] stride, [11:8] pad
  localparam logic [7:0] REG_DDR    = 8'h07; // kernel base byte address

  // Saturate a wide signed value to the feature-map width.
  function automatic data_t sat_data(input logic signed [ACC_BITS-1:0] v);
    localparam logic signed [ACC_BITS-1:0] MAXV = (ACC_BITS'(1) <<< (D_BITS-1)) - 1;
    localparam logic signed [ACC_BITS-1:0] MINV = -(ACC_BITS'(1) <<< (D_BITS-1));
    if (v > MAXV) return data_t'(MAXV);
    if (v < MINV) return data_t'(MINV);
    return data_t'(v);
  endfunction

endpackage
