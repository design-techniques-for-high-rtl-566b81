// ms_decim: multirate multistage IFIR decimator by 8.
//
// The channel filter H(z) is decomposed as an IFIR cascade and the
// down-sampler is moved forward through it (noble identity), so every
// section runs at the lowest rate it can:
//   NSTAGE = 3:  H = I1(z) I2(z^2) G(z^4):  I1 (7 taps) and down by 2,
//                I2 (7 taps) and down by 2, G (19 taps) and down by 2;
//   NSTAGE = 2:  H = I(z) G(z^4):  I (15 taps) and down by 4,
//                G (19 taps) and down by 2.
// Each section is a tdf_decim (folded polyphase transposed direct form with
// shared registers).  Between sections the CF coefficient fraction bits are
// dropped (arithmetic shift, rounding toward minus infinity), so each section
// output grows by two bits over its input.
//
// Timing: one clock at the input rate; in_valid marks input samples,
// out_valid pulses once per 8 inputs.  Both decompositions and the
// decimation factor follow the design examples; the three-stage form is the
// default because it is the smaller and lower-power of the two.  The
// coefficient values, word lengths and truncation are this design's own.
module ms_decim
  import fir_pkg::*;
#(
  parameter int B      = IN_W,
  parameter int NSTAGE = 3,
  parameter bit PIPE   = 1'b1,
  // derived, not meant to be overridden
  parameter int OW     = (NSTAGE == 3)
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
  if (NSTAGE == 3) begin : g_three
    localparam int W1 = acc_width(B, ABS_I1) - CF;
    localparam int W2 = acc_width(W1, ABS_I2) - CF;
    logic                 v1, v2;
    logic signed [W1-1:0] y1;
    logic signed [W2-1:0] y2;

    tdf_decim #(.B(B), .M(2), .N(N_I1), .COEF(COEF_I1), .PIPE(PIPE), .OUT_SHIFT(CF)) u_s1 (
      .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_x(in_x), .out_valid(v1), .out_y(y1));
    tdf_decim #(.B(W1), .M(2), .N(N_I2), .COEF(COEF_I2), .PIPE(PIPE), .OUT_SHIFT(CF)) u_s2 (
      .clk(clk), .rst_n(rst_n), .in_valid(v1), .in_x(y1), .out_valid(v2), .out_y(y2));
    tdf_decim #(.B(W2), .M(2), .N(N_G), .COEF(COEF_G), .PIPE(PIPE), .OUT_SHIFT(CF)) u_s3 (
      .clk(clk), .rst_n(rst_n), .in_valid(v2), .in_x(y2), .out_valid(out_valid), .out_y(out_y));
  end else begin : g_two
    localparam int W1 = acc_width(B, ABS_I) - CF;
    logic                 v1;
    logic signed [W1-1:0] y1;

    tdf_decim #(.B(B), .M(4), .N(N_I), .COEF(COEF_I), .PIPE(PIPE), .OUT_SHIFT(CF)) u_s1 (
      .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_x(in_x), .out_valid(v1), .out_y(y1));
    tdf_decim #(.B(W1), .M(2), .N(N_G), .COEF(COEF_G), .PIPE(PIPE), .OUT_SHIFT(CF)) u_s2 (
      .clk(clk), .rst_n(rst_n), .in_valid(v1), .in_x(y1), .out_valid(out_valid), .out_y(out_y));
  end
endmodule
