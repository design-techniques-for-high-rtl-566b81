// csa: one row of W full adders, the 3:2 carry-save adder.  Three addends are
// reduced to a sum vector and a carry vector (carry shifted left one place)
// with the delay of a single full adder and no carry propagation.  Arithmetic
// is modulo 2^W.  Purely combinational.
module csa #(
  parameter int W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] s,
  output logic [W-1:0] co
);
  logic [W-1:0] maj;
  always_comb begin
    s   = a ^ b ^ c;
    maj = (a & b) | (a & c) | (b & c);
    co  = maj << 1;
  end
endmodule
