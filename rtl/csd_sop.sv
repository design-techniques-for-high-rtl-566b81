// csd_sop: multiplierless sum of products  sum_i COEF[i] * x[i]  with fixed
// coefficients, result left in carry-save form.
//
// Every coefficient is recoded into canonic signed digits (CSD) at
// elaboration.  Each non-zero digit d at position p turns into one hard-wired
// shifted copy of its input; the copies are summed by a carry-save tree
// (csa_tree), so one CSA is spent per non-zero digit and no multiplier is
// built.  Sign extension is avoided with the "MSB fix": a positive term is
// {~x[B-1], x[B-2:0]} << p and a negative one {x[B-1], ~x[B-2:0]} << p, both
// plain unsigned vectors; the constants this leaves out are given by
// fir_pkg::csd_const and are summed once per filter into a compensation
// vector (CV) that the filter adds at the start of its tap chain.  The
// outputs therefore satisfy
//     out_s + out_c = sum_i (COEF[i] * x[i] - csd_const(COEF[i], B))  mod 2^W.
// A coefficient set with no non-zero digit gives a single zero addend.
//
// PIPE and LEVELS are handed to the tree: PIPE = 1 registers every CSA level
// (latency = tree levels, at least LEVELS, in cycles of en).
module csd_sop
  import fir_pkg::*;
#(
  parameter int B      = IN_W,
  parameter int W      = IN_W + CF + 2,
  parameter int NIN    = 1,
  parameter int COEF [NIN] = '{default: 393},
  parameter bit PIPE   = 1'b0,
  parameter int LEVELS = 0
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic signed [B-1:0] x [NIN],
  output logic [W-1:0]        out_s,
  output logic [W-1:0]        out_c
);
  // Index of the term for digit (i, p): the number of non-zero digits before it.
  function automatic int term_index(int i, int p);
    int n;
    n = 0;
    for (int ii = 0; ii < NIN; ii++)
      for (int pp = 0; pp < CSD_P; pp++)
        if ((ii < i || (ii == i && pp < p)) && csd_digit(COEF[ii], pp) != 0) n++;
    return n;
  endfunction

  localparam int NT  = term_index(NIN, 0);
  localparam int NTE = (NT > 0) ? NT : 1;

  logic [W-1:0] terms [NTE];

  if (NT == 0) begin : g_zero
    assign terms[0] = '0;
  end

  for (genvar i = 0; i < NIN; i++) begin : g_in
    logic [B-1:0] pos_t, neg_t;
    always_comb begin
      pos_t = {~x[i][B-1],  x[i][B-2:0]};
      neg_t = { x[i][B-1], ~x[i][B-2:0]};
    end
    for (genvar p = 0; p < CSD_P; p++) begin : g_dig
      localparam int D = csd_digit(COEF[i], p);
      if (D > 0) begin : g_pos
        assign terms[term_index(i, p)] = W'({{(W-B){1'b0}}, pos_t} << p);
      end else if (D < 0) begin : g_neg
        assign terms[term_index(i, p)] = W'({{(W-B){1'b0}}, neg_t} << p);
      end
    end
  end

  csa_tree #(.W(W), .NV(NTE), .PIPE(PIPE), .LEVELS(LEVELS)) u_tree (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (en),
    .in_v (terms),
    .out_s(out_s),
    .out_c(out_c)
  );
endmodule
