// skin_classifier: per-pixel skin-colour segmentation.
//
// Each RGB pixel is converted to YCbCr (ITU-R BT.601, 8-bit integer
// coefficients) and to the hue and saturation of HSV, and is marked as skin
// only if it passes thresholds in all three colour spaces:
//   RGB:   R > 95, G > 40, B > 20, max-min > 15, |R-G| > 15, R > G, R > B
//   YCbCr: CB_MIN <= Cb <= CB_MAX and CR_MIN <= Cr <= CR_MAX
//   HSV:   0 <= H <= H_MAX_DEG degrees, S_MIN_PCT <= 100*S <= S_MAX_PCT
// Since R is the largest component, H = 60*(G-B)/(R-min) and S = (R-min)/R,
// so both tests are made by cross-multiplication, without a divider.
// One pixel per cycle; the result appears one cycle after in_valid with
// out_valid, keeping the input's gaps.
//
// Converting to YCbCr and HSV and thresholding in all three spaces follows
// the reference design. The threshold values are not given there; the
// defaults are widely used skin rules from the literature and are
// parameters.
module skin_classifier
  import vision_pkg::*;
#(
  parameter int CB_MIN    = 77,
  parameter int CB_MAX    = 127,
  parameter int CR_MIN    = 133,
  parameter int CR_MAX    = 173,
  parameter int H_MAX_DEG = 50,
  parameter int S_MIN_PCT = 23,
  parameter int S_MAX_PCT = 68
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  rgb_t in_rgb,
  output logic out_valid,
  output logic out_skin
);

  int r, g, b, mx, mn, cb, cr;
  logic rgb_ok, ycc_ok, hsv_ok;

  always_comb begin
    r  = int'(in_rgb.r);
    g  = int'(in_rgb.g);
    b  = int'(in_rgb.b);
    mx = (r > g) ? ((r > b) ? r : b) : ((g > b) ? g : b);
    mn = (r < g) ? ((r < b) ? r : b) : ((g < b) ? g : b);
    // BT.601: Cb = 128 + (-43R - 85G + 128B)/256, Cr = 128 + (128R - 107G - 21B)/256
    cb = 128 + ((-43 * r - 85 * g + 128 * b) >>> 8);
    cr = 128 + ((128 * r - 107 * g - 21 * b) >>> 8);
    rgb_ok = r > 95 && g > 40 && b > 20 && (mx - mn) > 15 &&
             (r > g ? r - g : g - r) > 15 && r > g && r > b;
    ycc_ok = cb >= CB_MIN && cb <= CB_MAX && cr >= CR_MIN && cr <= CR_MAX;
    hsv_ok = g >= b && 60 * (g - b) <= H_MAX_DEG * (mx - mn) &&
             100 * (mx - mn) >= S_MIN_PCT * mx && 100 * (mx - mn) <= S_MAX_PCT * mx;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_skin  <= 1'b0;
    end else begin
      out_valid <= in_valid;
      out_skin  <= rgb_ok && ycc_ok && hsv_ok;
    end
  end

endmodule
