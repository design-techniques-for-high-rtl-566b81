// ms_interp: multirate multistage IFIR interpolator by 8, the transpose of
// ms_decim.  The up-samplers are moved behind the IFIR sections so that each
// section works at the lowest rate it can:
//   NSTAGE = 3:  up 2 and G (19 taps), up 2 and I2 (7 taps), up 2 and I1 (7 taps);
//   NSTAGE = 2:  up 2 and G (19 taps), up 4 and I (15 taps).
// Each section is a tdf_interp (polyphase transposed direct form with mirror
// symmetric filter pairs).  The commutator of each section spaces its outputs
// to match the next section's input rate, so the last section delivers one
// sample per clock.  Each section drops CF - log2(L) fraction bits, which
// restores the gain of L lost by zero insertion.
//
// Timing: one clock at the output rate; in_valid must come exactly every 8
// cycles (or less often), out_valid then carries 8 outputs per input.  The
// multistage interpolator structure follows the design description; the
// stage order, the factors (mirrored from the decimator), coefficient values,
// word lengths and gain scaling are this design's own.
module ms_interp
  import fir_pkg::*;
#(
  parameter int B      = IN_W,
  parameter int NSTAGE = 3,
  parameter bit PIPE   = 1'b1,
  // derived, not meant to be overridden
  parameter int OW     = (NSTAGE == 3)
                         ? acc_width(acc_width(acc_width(B, ABS_G) - (CF-1), ABS_I2) - (CF-1), ABS_I1) - (CF-1)
                         : acc_width(acc_width(B, ABS_G) - (CF-1), ABS_I) - (CF-2)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [B-1:0]  in_x,
  output logic                 out_valid,
  output logic signed [OW-1:0] out_y
);
  if (NSTAGE == 3) begin : g_three
    localparam int W1 = acc_width(B, ABS_G) - (CF - 1);
    localparam int W2 = acc_width(W1, ABS_I2) - (CF - 1);
    logic                 v1, v2;
    logic signed [W1-1:0] y1;
    logic signed [W2-1:0] y2;

    tdf_interp #(.B(B), .L(2), .N(N_G), .COEF(COEF_G), .PIPE(PIPE), .STRIDE(4),
                 .OUT_SHIFT(CF - 1)) u_s1 (
      .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_x(in_x), .out_valid(v1), .out_y(y1));
    tdf_interp #(.B(W1), .L(2), .N(N_I2), .COEF(COEF_I2), .PIPE(PIPE), .STRIDE(2),
                 .OUT_SHIFT(CF - 1)) u_s2 (
      .clk(clk), .rst_n(rst_n), .in_valid(v1), .in_x(y1), .out_valid(v2), .out_y(y2));
    tdf_interp #(.B(W2), .L(2), .N(N_I1), .COEF(COEF_I1), .PIPE(PIPE), .STRIDE(1),
                 .OUT_SHIFT(CF - 1)) u_s3 (
      .clk(clk), .rst_n(rst_n), .in_valid(v2), .in_x(y2), .out_valid(out_valid), .out_y(out_y));
  end else begin : g_two
    localparam int W1 = acc_width(B, ABS_G) - (CF - 1);
    logic                 v1;
    logic signed [W1-1:0] y1;

    tdf_interp #(.B(B), .L(2), .N(N_G), .COEF(COEF_G), .PIPE(PIPE), .STRIDE(4),
                 .OUT_SHIFT(CF - 1)) u_s1 (
      .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_x(in_x), .out_valid(v1), .out_y(y1));
    tdf_interp #(.B(W1), .L(4), .N(N_I), .COEF(COEF_I), .PIPE(PIPE), .STRIDE(1),
                 .OUT_SHIFT(CF - 2)) u_s2 (
      .clk(clk), .rst_n(rst_n), .in_valid(v1), .in_x(y1), .out_valid(out_valid), .out_y(out_y));
  end
endmodule
