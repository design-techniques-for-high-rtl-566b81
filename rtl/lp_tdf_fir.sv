// lp_tdf_fir: linear-phase transpose direct form FIR filter with CSD
// coefficients, carry-save accumulation and a vector merge adder.
//
//   y[n] = sum_k COEF[k] * x[n - k*ZS]          (k = 0 .. N-1)
//
// The input sample is registered once and broadcast to every tap.  Because
// the coefficients are symmetric, one CSD constant multiplier (csd_sop) is
// built per distinct coefficient (ceil(N/2) of them) and each product feeds
// both mirror taps k and N-1-k.  An anti-symmetric set (COEF[k] =
// -COEF[N-1-k]) shares the same way, the mirror tap adding the inverted
// sum/carry pair (the missing 2 of the two's complement goes into the
// compensation vector); any other set is detected at elaboration and gets one
// multiplier per tap.  The tap chain keeps the running sum
// in carry-save form: each tap adds its product (a sum/carry pair) to the
// sum/carry pair arriving from the previous tap with two CSA rows and stores
// the result, so the chain's critical path is two full-adder delays whatever
// the word length or filter length.  The compensation vector of the MSB-fix
// sign handling is added once, at the far end of the chain.  The sum and carry
// leaving tap 0 are merged by the VMA, which is a pipeline stage of its own.
// With PIPE = 1 the multiplier trees are pipelined after every CSA level
// (all trees padded to the same depth), so no path is longer than the two
// adders of a tap.  ZS > 1 places ZS registers between taps, giving the
// periodic model filter G(z^ZS) of an IFIR design.
//
// ONE_ADDER = 1 pipelines the chain to a single full-adder delay: a register
// is placed between the two CSA rows of every tap, and the carry half of each
// product is delayed by one register so that it meets the same sample.  With
// ZS > 1 the new register takes the place of one of the ZS tap-spacing
// registers, so the response is unchanged.  With ZS = 1 every tap now delays
// the chain by two samples; to keep the response, tap k takes its input from
// an input delay line, N-1-k samples back, which costs the mirror sharing
// (one multiplier per tap) and N-1 cycles of latency.
//
// Timing: one sample per cycle with in_valid high; the pipeline advances only
// on in_valid.  out_y is the response to the sample given LAT valid cycles
// earlier, LAT = 3 + tree depth (PIPE = 1) or 3 (PIPE = 0), plus 1 with
// ONE_ADDER and a further N-1 with ONE_ADDER and ZS = 1; out_valid marks
// it.  After reset the filter behaves as if all earlier inputs were zero:
// the chain registers reset to the value a zero history gives and are held
// there until the multiplier pipeline carries the first real sample.
//
// The structure and both pipelining levels are the ones described for the
// single-rate filter; the retiming details of the one-adder chain, the
// widths, the reset behaviour and the valid handshake are this design's own.
module lp_tdf_fir
  import fir_pkg::*;
#(
  parameter int B         = IN_W,
  parameter int N         = N_G,
  parameter int COEF [N]  = COEF_G,
  parameter int ZS        = 1,
  parameter bit PIPE      = 1'b1,
  parameter int OUT_SHIFT = 0,
  parameter bit ONE_ADDER = 1'b0,
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
  // one-adder chain with ZS = 1: taps read a delay line, products not shared
  localparam bit DL   = ONE_ADDER && ZS == 1;
  localparam int NU   = ((SYM || ANTI) && !DL) ? (N + 1) / 2 : N;
  // registers between taps besides the tap register(s)
  localparam int ND   = ONE_ADDER ? ((ZS > 2) ? ZS - 2 : 0) : ZS - 1;

  // distinct multiplier used by tap k
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

  // deepest multiplier tree; all are padded to this depth
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

  // sum of MSB-fix constants of taps 0 .. k-1 (modulo 2^W)
  function automatic logic [W-1:0] const_below(int k);
    longint s;
    s = 0;
    for (int i = 0; i < k; i++) s += tap_const(i);
    return W'(s);
  endfunction

  localparam int T   = PIPE ? tree_depth() : 0;
  localparam int LAT = T + 3 + (ONE_ADDER ? 1 : 0) + (DL ? N - 1 : 0);
  localparam logic [W-1:0] CV = const_below(N);  // compensation vector

  // ---------------------------------------------------------------- input
  logic signed [B-1:0] x_r [1];
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)        x_r[0] <= '0;
    else if (in_valid) x_r[0] <= in_x;

  // fill counter: chain starts once the trees carry the first sample
  localparam int FCW = $clog2(LAT + 1);
  logic [FCW-1:0] fill;
  logic           chain_en;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) fill <= '0;
    else if (in_valid && fill != FCW'(LAT)) fill <= fill + 1'b1;

  assign chain_en = in_valid && (fill >= FCW'(T + 1));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid && (fill >= FCW'(LAT - 1));

  // input delay line of the one-adder chain with ZS = 1: tap k reads the
  // sample N-1-k inputs back (xd[0] is the input register)
  logic signed [B-1:0] xd [N];
  assign xd[0] = x_r[0];
  for (genvar i = 1; i < N; i++) begin : g_xd
    if (DL) begin : g_reg
      always_ff @(posedge clk or negedge rst_n)
        if (!rst_n)        xd[i] <= '0;
        else if (in_valid) xd[i] <= xd[i-1];
    end else begin : g_none
      assign xd[i] = '0;
    end
  end

  // ---------------------------------------------------------- multipliers
  logic [W-1:0] ps [NU];
  logic [W-1:0] pc [NU];

  for (genvar u = 0; u < NU; u++) begin : g_mul
    localparam int CU [1] = '{COEF[u]};
    logic signed [B-1:0] xm [1];
    assign xm[0] = DL ? xd[N-1-u] : x_r[0];
    csd_sop #(.B(B), .W(W), .NIN(1), .COEF(CU), .PIPE(PIPE), .LEVELS(T)) u_mul (
      .clk  (clk),
      .rst_n(rst_n),
      .en   (in_valid),
      .x    (xm),
      .out_s(ps[u]),
      .out_c(pc[u])
    );
  end

  // ------------------------------------------------------------ tap chain
  // acc_s/acc_c[k]: register of tap k; d_*: the ND extra registers that
  // follow it.  tap_in_*[k]: what arrives at tap k from tap k+1.
  logic [W-1:0] tap_in_s [N];
  logic [W-1:0] tap_in_c [N];
  logic [W-1:0] acc_s    [N];
  logic [W-1:0] acc_c    [N];

  assign tap_in_s[N-1] = CV;
  assign tap_in_c[N-1] = '0;

  for (genvar k = 0; k < N; k++) begin : g_tap
    localparam logic [W-1:0] RST = const_below(k);
    logic [W-1:0] p_s, p_c, t_s, t_c, n_s, n_c;

    assign p_s = negated(k) ? ~ps[mult_of(k)] : ps[mult_of(k)];
    assign p_c = negated(k) ? ~pc[mult_of(k)] : pc[mult_of(k)];

    logic [W-1:0] h_s, h_c, q_c;   // inputs of the second CSA row

    csa #(.W(W)) u_csa0 (.a(tap_in_s[k]), .b(tap_in_c[k]), .c(p_s),
                         .s(t_s), .co(t_c));
    csa #(.W(W)) u_csa1 (.a(h_s), .b(h_c), .c(q_c),
                         .s(n_s), .co(n_c));

    if (ONE_ADDER) begin : g_half
      // register between the two rows; the carry half of the product is
      // delayed by one register so that both halves meet the same sample.
      // After reset the half register holds the whole zero-history value.
      always_ff @(posedge clk or negedge rst_n)
        if (!rst_n) begin
          h_s <= RST;
          h_c <= '0;
          q_c <= '0;
        end else if (chain_en) begin
          h_s <= t_s;
          h_c <= t_c;
          q_c <= p_c;
        end
    end else begin : g_full
      assign h_s = t_s;
      assign h_c = t_c;
      assign q_c = p_c;
    end

    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) begin
        acc_s[k] <= RST;
        acc_c[k] <= '0;
      end else if (chain_en) begin
        acc_s[k] <= n_s;
        acc_c[k] <= n_c;
      end

    if (k > 0) begin : g_link
      if (ND > 0) begin : g_dly
        logic [W-1:0] d_s [ND];
        logic [W-1:0] d_c [ND];
        always_ff @(posedge clk or negedge rst_n)
          if (!rst_n) begin
            d_s <= '{default: RST};
            d_c <= '{default: '0};
          end else if (chain_en) begin
            d_s[0] <= acc_s[k];
            d_c[0] <= acc_c[k];
            for (int i = 1; i < ND; i++) begin
              d_s[i] <= d_s[i-1];
              d_c[i] <= d_c[i-1];
            end
          end
        assign tap_in_s[k-1] = d_s[ND-1];
        assign tap_in_c[k-1] = d_c[ND-1];
      end else begin : g_nodly
        assign tap_in_s[k-1] = acc_s[k];
        assign tap_in_c[k-1] = acc_c[k];
      end
    end
  end

  // ------------------------------------------------------------------ VMA
  vma #(.W(W), .SHIFT(OUT_SHIFT)) u_vma (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (chain_en),
    .s    (acc_s[0]),
    .c    (acc_c[0]),
    .y    (out_y)
  );
endmodule
