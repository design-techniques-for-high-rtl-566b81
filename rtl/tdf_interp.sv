// tdf_interp: polyphase interpolator by L in transposed direct form with
// mirror symmetric filter pairs.
//
//   y[n*L + m] = sum_j COEF[m + L*j] * x[n - j]    (m = 0 .. L-1)
//
// i.e. the input is up-sampled by L (L-1 zeros inserted) and filtered by
// COEF.  Every input sample is registered and broadcast to the L polyphase
// subfilters, each a transposed carry-save tap chain running at the input
// rate.  For a linear-phase (symmetric) prototype, subfilter m and subfilter
// L-1-m hold the same coefficients in mirrored order, so every coefficient
// value is needed twice and only one CSD multiplier (csd_sop) is built per
// distinct coefficient, ceil(N/2) in all, each feeding two taps.  The
// chains store internal (carry-save) sums.  After each input an output
// commutator reads the L chain outputs in turn, one every STRIDE cycles,
// through a single VMA.  The MSB-fix compensation vector of each chain
// enters at its far end.  PIPE = 1 pipelines the multiplier trees after every
// CSA level; those registers advance once per input sample.
//
// Timing: the clock runs at (or above) the output rate.  in_valid marks an
// input sample and must be at least L*STRIDE cycles after the previous one
// (an assertion checks this).  The L outputs of a sample appear on
// out_valid, STRIDE cycles apart, starting 3 cycles after the in_valid that
// carried the sample T input samples later (T = tree depth with PIPE = 1,
// otherwise 0; so 3 cycles after the sample itself for PIPE = 0).  After reset
// the filter acts as if all earlier inputs were zero.
//
// The structure follows the high-speed interpolator described with the
// mirror-pair technique; widths, the commutator timing and the handshake are
// this design's own.
module tdf_interp
  import fir_pkg::*;
#(
  parameter int B         = IN_W,
  parameter int L         = 2,
  parameter int N         = N_G,
  parameter int COEF [N]  = COEF_G,
  parameter bit PIPE      = 1'b1,
  parameter int STRIDE    = 1,
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
  function automatic int abs_sum(int c [N]);
    int s;
    s = 0;
    for (int k = 0; k < N; k++) s += (c[k] < 0) ? -c[k] : c[k];
    return s;
  endfunction

  function automatic bit is_sym();
    for (int k = 0; k < N; k++)
      if (COEF[k] != COEF[N-1-k]) return 1'b0;
    return 1'b1;
  endfunction

  function automatic bit is_anti();
    bit nz;
    nz = 1'b0;
    for (int k = 0; k < N; k++) begin
      if (COEF[k] != -COEF[N-1-k]) return 1'b0;
      if (COEF[k] != 0) nz = 1'b1;
    end
    return nz;
  endfunction

  localparam bit SYM  = is_sym();
  localparam bit ANTI = !SYM && is_anti();
  localparam int NU   = (SYM || ANTI) ? (N + 1) / 2 : N;
  localparam int JMAX = (N + L - 1) / L;

  function automatic int mult_of(int k);
    return ((SYM || ANTI) && k >= NU) ? N - 1 - k : k;
  endfunction

  // tap k takes its product negated (mirror tap of an anti-symmetric set)
  function automatic bit negated(int k);
    return ANTI && k >= NU;
  endfunction

  // constant that tap k's addend lacks: the MSB-fix constant of its
  // coefficient, or for a negated product (~s + ~c = -(s + c) - 2) two minus
  // the constant of the mirror coefficient
  function automatic longint tap_const(int k);
    return negated(k) ? 2 - csd_const(COEF[N-1-k], B) : csd_const(COEF[k], B);
  endfunction

  function automatic int tree_depth();
    int d;
    int t;
    d = 0;
    for (int u = 0; u < NU; u++) begin
      t = csa_levels((csd_terms(COEF[u]) > 0) ? csd_terms(COEF[u]) : 1);
      if (t > d) d = t;
    end
    return d;
  endfunction

  // taps of subfilter m
  function automatic int sub_len(int m);
    return (N - m + L - 1) / L;
  endfunction

  // MSB-fix constants of subfilter m's taps 0 .. j-1 (modulo 2^W)
  function automatic logic [W-1:0] const_below(int m, int j);
    longint s;
    s = 0;
    for (int i = 0; i < j; i++) s += tap_const(m + L * i);
    return W'(s);
  endfunction

  localparam int T = PIPE ? tree_depth() : 0;

  // ------------------------------------------------------ input and fill
  logic signed [B-1:0] x_r [1];
  logic                v1;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      x_r[0] <= '0;
      v1     <= 1'b0;
    end else begin
      v1 <= in_valid;
      if (in_valid) x_r[0] <= in_x;
    end

  localparam int FCW = $clog2(T + 2);
  logic [FCW-1:0] fill;
  logic           chain_en;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) fill <= '0;
    else if (v1 && fill != FCW'(T)) fill <= fill + 1'b1;

  assign chain_en = v1 && (fill == FCW'(T));

  // ---------------------------------------------------------- multipliers
  logic [W-1:0] ps [NU];
  logic [W-1:0] pc [NU];
  for (genvar u = 0; u < NU; u++) begin : g_mul
    localparam int CU [1] = '{COEF[u]};
    csd_sop #(.B(B), .W(W), .NIN(1), .COEF(CU), .PIPE(PIPE), .LEVELS(T)) u_mul (
      .clk  (clk),
      .rst_n(rst_n),
      .en   (v1),
      .x    (x_r),
      .out_s(ps[u]),
      .out_c(pc[u])
    );
  end

  // ------------------------------------------------- polyphase subfilters
  logic [W-1:0] out_s [L];
  logic [W-1:0] out_c [L];

  for (genvar m = 0; m < L; m++) begin : g_sub
    localparam int JM = sub_len(m);
    logic [W-1:0] tap_in_s [JM];
    logic [W-1:0] tap_in_c [JM];
    logic [W-1:0] acc_s    [JM];
    logic [W-1:0] acc_c    [JM];

    assign tap_in_s[JM-1] = const_below(m, JM);
    assign tap_in_c[JM-1] = '0;

    for (genvar j = 0; j < JM; j++) begin : g_tap
      localparam int U = mult_of(m + L * j);
      localparam logic [W-1:0] RST = const_below(m, j);
      localparam bit NEG = negated(m + L * j);
      logic [W-1:0] p_s, p_c, t_s, t_c, n_s, n_c;

      assign p_s = NEG ? ~ps[U] : ps[U];
      assign p_c = NEG ? ~pc[U] : pc[U];

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

    assign out_s[m] = acc_s[0];
    assign out_c[m] = acc_c[0];
  end

  // ---------------------------------------------------- output commutator
  localparam int NT  = L * STRIDE;
  localparam int TW  = $clog2(NT + 1);
  logic          start, busy_q, busy, emit;
  logic [TW-1:0] t_q, t;
  logic [W-1:0]  sel_s, sel_c;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) start <= 1'b0;
    else        start <= chain_en;

  always_comb begin
    busy  = start || busy_q;
    t     = start ? '0 : t_q;
    emit  = busy && ((int'(t) % STRIDE) == 0);
    sel_s = out_s[int'(t) / STRIDE];
    sel_c = out_c[int'(t) / STRIDE];
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      busy_q <= 1'b0;
      t_q    <= '0;
    end else if (busy) begin
      busy_q <= (t != TW'(NT - 1));
      t_q    <= t + 1'b1;
    end

  vma #(.W(W), .SHIFT(OUT_SHIFT)) u_vma (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (emit),
    .s    (sel_s),
    .c    (sel_c),
    .y    (out_y)
  );

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= emit;

  // input spacing rule: a new sample only after the commutator is done
  logic [TW-1:0] gap;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) gap <= TW'(NT);
    else if (in_valid) gap <= TW'(1);
    else if (gap != TW'(NT)) gap <= gap + 1'b1;

  a_spacing: assert property (@(posedge clk)
                              in_valid |-> gap == TW'(NT))
    else $error("tdf_interp: in_valid less than L*STRIDE cycles after the previous one");
endmodule
