// tdf_decim: polyphase decimator by M in transposed direct form with the
// memory-saving technique.
//
//   y[n] = sum_k COEF[k] * x[n*M + M-1 - k]        (k = 0 .. N-1)
//
// x is counted from 0 after reset, so the n-th output is the filter response
// at the last sample of the n-th block of M inputs.  A commutator collects M
// input samples into a block register.  Writing k = M*j + m, the M polyphase
// subfilters are folded into one transposed chain of J = ceil(N/M) taps that
// runs once per block: tap j adds P_j = sum_m COEF[M*j+m] * x_m, where x_m is
// the block's sample m places back, to the carry-save sum coming from tap
// j+1.  The chain registers are therefore shared by all M subfilters, and the
// filter holds about N/M accumulator registers instead of N.  Each P_j is one
// multiplierless CSD sum of products (csd_sop); the chain adds it with two
// CSA rows; the VMA merges the sum and carry of tap 0.  The MSB-fix
// compensation vector enters at the far end of the chain.  With PIPE = 1 the
// product trees are pipelined after every CSA level; those registers, like the
// chain, advance once per block.
//
// Timing: the clock runs at the input rate, in_valid marks an input sample
// (at most one per cycle).  out_valid pulses once per M inputs; out_y is the
// output of the block that completed T + 1 blocks earlier plus 2 cycles
// (T = tree depth with PIPE = 1, 0 otherwise).  After reset the filter acts
// as if all earlier inputs were zero.
//
// The folded transposed structure is the one described for high-speed
// decimators; widths, reset behaviour and handshake are this design's own.
module tdf_decim
  import fir_pkg::*;
#(
  parameter int B         = IN_W,
  parameter int M         = 2,
  parameter int N         = N_G,
  parameter int COEF [N]  = COEF_G,
  parameter bit PIPE      = 1'b1,
  parameter int OUT_SHIFT = 0,
  // derived, not meant to be overridden
  parameter int W         = acc_width(B, abs_sum(COEF)),
  parameter int OW        = W - OUT_SHIFT
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [B-1:0]  in_x,
  output logic                 out_valid,
  output logic signed [OW-1:0] out_y
);
  typedef int sub_t [M];

  function automatic int abs_sum(int c [N]);
    int s;
    s = 0;
    for (int k = 0; k < N; k++) s += (c[k] < 0) ? -c[k] : c[k];
    return s;
  endfunction

  localparam int J = (N + M - 1) / M;

  // coefficients of chain tap j, one per block sample m (zero beyond N)
  function automatic sub_t tap_coef(int j);
    sub_t r;
    for (int m = 0; m < M; m++) r[m] = (M * j + m < N) ? COEF[M * j + m] : 0;
    return r;
  endfunction

  function automatic int tap_terms(int j);
    int n;
    n = 0;
    for (int m = 0; m < M; m++)
      if (M * j + m < N) n += csd_terms(COEF[M * j + m]);
    return (n > 0) ? n : 1;
  endfunction

  function automatic int tree_depth();
    int d;
    d = 0;
    for (int j = 0; j < J; j++)
      if (csa_levels(tap_terms(j)) > d) d = csa_levels(tap_terms(j));
    return d;
  endfunction

  // MSB-fix constants of the chain taps below tap j (modulo 2^W)
  function automatic logic [W-1:0] const_below(int j);
    longint s;
    s = 0;
    for (int k = 0; k < M * j && k < N; k++) s += csd_const(COEF[k], B);
    return W'(s);
  endfunction

  localparam int T = PIPE ? tree_depth() : 0;
  localparam logic [W-1:0] CV = const_below(J);

  // ----------------------------------------------------------- commutator
  localparam int PW = (M > 1) ? $clog2(M) : 1;
  logic signed [B-1:0] sr  [M-1];
  logic signed [B-1:0] blk [M];
  logic [PW-1:0]       ph;
  logic                blk_v;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      sr    <= '{default: '0};
      blk   <= '{default: '0};
      ph    <= '0;
      blk_v <= 1'b0;
    end else begin
      blk_v <= 1'b0;
      if (in_valid) begin
        sr[0] <= in_x;
        for (int i = 1; i < M - 1; i++) sr[i] <= sr[i-1];
        if (ph == PW'(M - 1)) begin
          ph     <= '0;
          blk_v  <= 1'b1;
          blk[0] <= in_x;
          for (int i = 1; i < M; i++) blk[i] <= sr[i-1];
        end else begin
          ph <= ph + 1'b1;
        end
      end
    end

  // block counter: the chain starts once the trees carry the first block
  localparam int FCW = $clog2(T + 3);
  logic [FCW-1:0] bfill;
  logic           chain_en;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) bfill <= '0;
    else if (blk_v && bfill != FCW'(T + 1)) bfill <= bfill + 1'b1;

  assign chain_en = blk_v && (bfill >= FCW'(T));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= chain_en && (bfill >= FCW'(T + 1));

  // ------------------------------------------------- polyphase tap chain
  logic [W-1:0] tap_in_s [J];
  logic [W-1:0] tap_in_c [J];
  logic [W-1:0] acc_s    [J];
  logic [W-1:0] acc_c    [J];

  assign tap_in_s[J-1] = CV;
  assign tap_in_c[J-1] = '0;

  for (genvar j = 0; j < J; j++) begin : g_tap
    localparam sub_t CJ = tap_coef(j);
    localparam logic [W-1:0] RST = const_below(j);
    logic [W-1:0] p_s, p_c, t_s, t_c, n_s, n_c;

    csd_sop #(.B(B), .W(W), .NIN(M), .COEF(CJ), .PIPE(PIPE), .LEVELS(T)) u_sop (
      .clk  (clk),
      .rst_n(rst_n),
      .en   (blk_v),
      .x    (blk),
      .out_s(p_s),
      .out_c(p_c)
    );

    csa #(.W(W)) u_csa0 (.a(tap_in_s[j]), .b(tap_in_c[j]), .c(p_s), .s(t_s), .co(t_c));
    csa #(.W(W)) u_csa1 (.a(t_s), .b(t_c), .c(p_c), .s(n_s), .co(n_c));

    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) begin
        acc_s[j] <= RST;
        acc_c[j] <= '0;
      end else if (chain_en) begin
        acc_s[j] <= n_s;
        acc_c[j] <= n_c;
      end

    if (j > 0) begin : g_link
      assign tap_in_s[j-1] = acc_s[j];
      assign tap_in_c[j-1] = acc_c[j];
    end
  end

  vma #(.W(W), .SHIFT(OUT_SHIFT)) u_vma (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (chain_en),
    .s    (acc_s[0]),
    .c    (acc_c[0]),
    .y    (out_y)
  );
endmodule
