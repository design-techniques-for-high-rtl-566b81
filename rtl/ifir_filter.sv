// ifir_filter: single-rate interpolated FIR (IFIR) channel filter.
//
// The narrow-band filter H(z) is built as a periodic model filter G(z^4),
// whose impulse response has only every 4th sample non-zero, in cascade with
// an image suppressor that removes the unwanted passband images of G(z^4):
//   IMG_STAGES = 2:  H = I1(z) * I2(z^2) * G(z^4)   (7 + 7 + 19 taps)
//   IMG_STAGES = 1:  H = I(z) * G(z^4)              (15 + 19 taps)
// against 69 taps for a direct design.  Each section is an lp_tdf_fir;
// I2(z^2) and G(z^4) are realised by placing 2 and 4 registers between taps.
// Between sections the CF fraction bits are dropped (arithmetic shift), so
// each section output is two bits wider than its input.
//
// Timing: one sample per clock when in_valid is high; the whole cascade
// advances only on in_valid.  The sections are chained through their
// out_valid, so out_valid marks the response to the sample given
// sum(LAT_section) valid cycles earlier.  The decompositions and tap lengths
// follow the design example; the default is the two-stage suppressor, the
// smaller of the two.  Coefficient values, word lengths and truncation are
// this design's own.
module ifir_filter
  import fir_pkg::*;
#(
  parameter int B          = IN_W,
  parameter int IMG_STAGES = 2,
  parameter bit PIPE       = 1'b1,
  // derived, not meant to be overridden
  parameter int OW         = (IMG_STAGES == 2)
                             ? acc_width(acc_width(acc_width(B, ABS_I1) - CF, ABS_I2) - CF, ABS_G) - CF
                             : acc_width(acc_width(B, ABS_I) - CF, ABS_G) - CF
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [B-1:0]  in_x,
  output logic                 out_valid,
  output logic signed [OW-1:0] out_y
);
  if (IMG_STAGES == 2) begin : g_two
    localparam int W1 = acc_width(B, ABS_I1) - CF;
    localparam int W2 = acc_width(W1, ABS_I2) - CF;
    logic                 v1, v2;
    logic signed [W1-1:0] y1;
    logic signed [W2-1:0] y2;

    lp_tdf_fir #(.B(B), .N(N_I1), .COEF(COEF_I1), .ZS(1), .PIPE(PIPE), .OUT_SHIFT(CF)) u_i1 (
      .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_x(in_x), .out_valid(v1), .out_y(y1));
    lp_tdf_fir #(.B(W1), .N(N_I2), .COEF(COEF_I2), .ZS(2), .PIPE(PIPE), .OUT_SHIFT(CF)) u_i2 (
      .clk(clk), .rst_n(rst_n), .in_valid(v1), .in_x(y1), .out_valid(v2), .out_y(y2));
    lp_tdf_fir #(.B(W2), .N(N_G), .COEF(COEF_G), .ZS(4), .PIPE(PIPE), .OUT_SHIFT(CF)) u_g (
      .clk(clk), .rst_n(rst_n), .in_valid(v2), .in_x(y2), .out_valid(out_valid), .out_y(out_y));
  end else begin : g_one
    localparam int W1 = acc_width(B, ABS_I) - CF;
    logic                 v1;
    logic signed [W1-1:0] y1;

    lp_tdf_fir #(.B(B), .N(N_I), .COEF(COEF_I), .ZS(1), .PIPE(PIPE), .OUT_SHIFT(CF)) u_i (
      .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_x(in_x), .out_valid(v1), .out_y(y1));
    lp_tdf_fir #(.B(W1), .N(N_G), .COEF(COEF_G), .ZS(4), .PIPE(PIPE), .OUT_SHIFT(CF)) u_g (
      .clk(clk), .rst_n(rst_n), .in_valid(v1), .in_x(y1), .out_valid(out_valid), .out_y(out_y));
  end
endmodule
