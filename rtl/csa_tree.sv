// csa_tree: carry-save reduction of NV addends to one sum/carry pair.
//
// Level after level, every group of three vectors passes through a 3:2
// carry-save adder (csa) and the one or two vectors left over pass straight
// on, until two vectors remain (a Wallace-style tree).  No carry propagates
// anywhere, so each level costs one full-adder delay.  With PIPE = 1 a
// register follows every level, which pipelines the tree to a single adder
// delay; LEVELS (if larger than the levels the tree needs) adds
// pass-through levels so that trees of different sizes can be given the
// same latency.  Registers advance when en is high and clear on reset.
//
// Interface: in_v[NV] addends (W bits, modulo 2^W); out_s/out_c, whose sum
// modulo 2^W equals the sum of the addends.  Latency: NLEV cycles of en with
// PIPE = 1, where NLEV = max(LEVELS, levels needed); none with PIPE = 0.
module csa_tree
  import fir_pkg::*;
#(
  parameter int W      = 16,
  parameter int NV     = 4,
  parameter bit PIPE   = 1'b0,
  parameter int LEVELS = 0
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic [W-1:0]  in_v [NV],
  output logic [W-1:0]  out_s,
  output logic [W-1:0]  out_c
);
  localparam int NEED = csa_levels(NV);
  localparam int NLEV = (LEVELS > NEED) ? LEVELS : NEED;

  // Level l reads cur (its N_IN input vectors) and produces q (N_OUT vectors),
  // which is registered or wired according to PIPE.
  for (genvar l = 0; l < NLEV; l++) begin : g_lev
    localparam int N_IN  = csa_count(NV, l);
    localparam int N_OUT = csa_count(NV, l + 1);
    localparam int NG    = (N_IN > 2) ? N_IN / 3 : 0;
    logic [W-1:0] cur [N_IN];
    logic [W-1:0] nxt [N_OUT];
    logic [W-1:0] q   [N_OUT];

    for (genvar i = 0; i < N_IN; i++) begin : g_cur
      if (l == 0) begin : g_first
        assign cur[i] = in_v[i];
      end else begin : g_next
        assign cur[i] = g_lev[l-1].q[i];
      end
    end

    for (genvar g = 0; g < NG; g++) begin : g_csa
      csa #(.W(W)) u_csa (
        .a (cur[3*g]),
        .b (cur[3*g+1]),
        .c (cur[3*g+2]),
        .s (nxt[2*g]),
        .co(nxt[2*g+1])
      );
    end
    for (genvar r = 2*NG; r < N_OUT; r++) begin : g_pass
      assign nxt[r] = cur[3*NG + (r - 2*NG)];
    end

    if (PIPE) begin : g_reg
      always_ff @(posedge clk or negedge rst_n)
        if (!rst_n)  q <= '{default: '0};
        else if (en) q <= nxt;
    end else begin : g_wire
      assign q = nxt;
    end
  end

  if (NLEV == 0) begin : g_flat
    assign out_s = in_v[0];
    if (NV >= 2) begin : g_two
      assign out_c = in_v[1];
    end else begin : g_one
      assign out_c = '0;
    end
  end else begin : g_tree
    assign out_s = g_lev[NLEV-1].q[0];
    if (csa_count(NV, NLEV) >= 2) begin : g_two
      assign out_c = g_lev[NLEV-1].q[1];
    end else begin : g_one
      assign out_c = '0;
    end
  end
endmodule
