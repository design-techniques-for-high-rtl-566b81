// vma: vector merge adder.  The carry-propagate adder at the end of a
// carry-save filter core that adds the sum and carry vectors into the
// two's-complement result.  It is written as a plain '+', which lets
// synthesis pick the adder architecture (ripple, carry-select or
// carry-lookahead) that meets timing.  The result is registered when en is
// high, so the VMA forms its own pipeline stage and its delay does not add to
// the tap delay.  An optional arithmetic right shift (SHIFT) drops fraction
// bits on the way out.
//
// Interface: s, c (W bits) in; y (W - SHIFT bits) = (s + c) >>> SHIFT,
// one cycle after en.
module vma #(
  parameter int W     = 16,
  parameter int SHIFT = 0
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        en,
  input  logic [W-1:0]                s,
  input  logic [W-1:0]                c,
  output logic signed [W-SHIFT-1:0]   y
);
  logic [W-1:0] sum;
  always_comb sum = s + c;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)  y <= '0;
    else if (en) y <= sum[W-1:SHIFT];
endmodule
