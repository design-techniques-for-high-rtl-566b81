// mmfir_top: the three filter engines of the CDMA channel-filter design,
// side by side, each with its own ports and sharing clock and reset:
//   ifir_*   single-rate IFIR filter I1(z) I2(z^2) G(z^4)   (ifir_filter)
//   dec_*    multistage decimator by 8, three sections       (ms_decim)
//   int_*    multistage interpolator by 8, three sections    (ms_interp)
// All three are built from the same multiplierless blocks: CSD constant
// multipliers, carry-save tap chains and a vector merge adder at each output.
// Inputs are 12-bit two's complement samples; see the sub-blocks for the
// timing of each engine (the interpolator needs in_valid at most once every
// 8 cycles).  Which engines are grouped in one top is this design's choice.
module mmfir_top
  import fir_pkg::*;
#(
  parameter int B = IN_W
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  ifir_in_valid,
  input  logic signed [B-1:0]   ifir_in_x,
  output logic                  ifir_out_valid,
  output logic signed [B+5:0]   ifir_out_y,
  input  logic                  dec_in_valid,
  input  logic signed [B-1:0]   dec_in_x,
  output logic                  dec_out_valid,
  output logic signed [B+5:0]   dec_out_y,
  input  logic                  int_in_valid,
  input  logic signed [B-1:0]   int_in_x,
  output logic                  int_out_valid,
  output logic signed [B+8:0]   int_out_y
);
  ifir_filter #(.B(B)) u_ifir (
    .clk(clk), .rst_n(rst_n), .in_valid(ifir_in_valid), .in_x(ifir_in_x),
    .out_valid(ifir_out_valid), .out_y(ifir_out_y));
  ms_decim #(.B(B)) u_dec (
    .clk(clk), .rst_n(rst_n), .in_valid(dec_in_valid), .in_x(dec_in_x),
    .out_valid(dec_out_valid), .out_y(dec_out_y));
  ms_interp #(.B(B)) u_int (
    .clk(clk), .rst_n(rst_n), .in_valid(int_in_valid), .in_x(int_in_x),
    .out_valid(int_out_valid), .out_y(int_out_y));
endmodule
