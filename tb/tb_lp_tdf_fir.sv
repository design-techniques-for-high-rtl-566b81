// tb_lp_tdf_fir: self-checking test of the linear-phase transpose direct
// form filter.  Two instances run on random 12-bit input:
//   dut_a  model filter G(z) (19 taps), pipelined trees, a sample every cycle;
//          the first output must appear 5 cycles after the first input
//          (1 input register + 2 tree levels + tap register + VMA);
//   dut_b  periodic model filter G(z^4) with combinational trees, fed with
//          random gaps in in_valid;
//   dut_c  an anti-symmetric 11-tap set (zero centre tap), pipelined trees,
//          a sample every cycle: the mirror taps share negated products;
//   dut_d  as dut_a with the one-adder chain (input delay line): its first
//          output must appear 24 cycles after the first input (5 + 1 + 18);
//   dut_e  as dut_b with the one-adder chain (spacing register reused).
// Expected outputs come from a direct convolution over the input history.
// The pipeline only advances on in_valid, so the last LAT-1 = 4 responses of
// dut_a stay inside it when the input stops.
module tb_lp_tdf_fir;
  import fir_pkg::*;

  localparam int NS   = 600;
  localparam int HIST = 128;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  initial #1 rst_n = 1'b0;  // reset edge: the asynchronous resets act at once
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  // ---------------------------------------------------------------- dut_a
  logic               va, vb, ova, ovb;
  logic signed [11:0] xa, xb;
  logic signed [23:0] ya, yb;

  lp_tdf_fir dut_a (.clk(clk), .rst_n(rst_n), .in_valid(va), .in_x(xa),
                    .out_valid(ova), .out_y(ya));
  // anti-symmetric set for dut_c; output width acc_width(12, 672) = 23
  localparam int NC = 11;
  localparam int COEF_C [NC] = '{5, 0, -41, 0, 290, 0, -290, 0, 41, 0, -5};
  logic               ovc;
  logic signed [22:0] yc;
  lp_tdf_fir #(.N(NC), .COEF(COEF_C)) dut_c (.clk(clk), .rst_n(rst_n),
                    .in_valid(va), .in_x(xa), .out_valid(ovc), .out_y(yc));

  logic               ovd, ove;
  logic signed [23:0] yd, ye;
  lp_tdf_fir #(.ONE_ADDER(1'b1)) dut_d (.clk(clk), .rst_n(rst_n),
                    .in_valid(va), .in_x(xa), .out_valid(ovd), .out_y(yd));
  lp_tdf_fir #(.ZS(4), .PIPE(1'b0), .ONE_ADDER(1'b1)) dut_e (.clk(clk),
                    .rst_n(rst_n), .in_valid(vb), .in_x(xb), .out_valid(ove),
                    .out_y(ye));

  lp_tdf_fir #(.ZS(4), .PIPE(1'b0)) dut_b (.clk(clk), .rst_n(rst_n),
                    .in_valid(vb), .in_x(xb), .out_valid(ovb), .out_y(yb));

  longint ha [HIST];
  longint hb [HIST];
  longint qa [$];
  longint qb [$];
  longint qc [$];
  longint qd [$];
  longint qe [$];
  int na = 0, nb = 0, ra = 0, rb = 0, rc = 0, rd = 0, re = 0;
  int cyc = 0, first_in = -1, first_out = -1, first_out_d = -1;

  function automatic longint conv(ref longint h [HIST], input int n, input int zs);
    longint s;
    s = 0;
    for (int k = 0; k < N_G; k++)
      if (n - k * zs >= 0) s += longint'(COEF_G[k]) * h[(n - k * zs) % HIST];
    return s;
  endfunction

  function automatic longint conv_c(ref longint h [HIST], input int n);
    longint s;
    s = 0;
    for (int k = 0; k < NC; k++)
      if (n - k >= 0) s += longint'(COEF_C[k]) * h[(n - k) % HIST];
    return s;
  endfunction

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && ova) begin
      if (first_out < 0) first_out = cyc;
      checks++;
      if (qa.size() == 0 || longint'(ya) != qa[0]) begin
        failures++;
        if (failures < 10) $display("dut_a mismatch out %0d: got %0d", ra, ya);
      end
      if (qa.size() != 0) void'(qa.pop_front());
      ra++;
    end
    if (rst_n && ovc) begin
      checks++;
      if (qc.size() == 0 || longint'(yc) != qc[0]) begin
        failures++;
        if (failures < 10) $display("dut_c mismatch out %0d: got %0d", rc, yc);
      end
      if (qc.size() != 0) void'(qc.pop_front());
      rc++;
    end
    if (rst_n && ovd) begin
      if (first_out_d < 0) first_out_d = cyc;
      checks++;
      if (qd.size() == 0 || longint'(yd) != qd[0]) begin
        failures++;
        if (failures < 10) $display("dut_d mismatch out %0d: got %0d", rd, yd);
      end
      if (qd.size() != 0) void'(qd.pop_front());
      rd++;
    end
    if (rst_n && ove) begin
      checks++;
      if (qe.size() == 0 || longint'(ye) != qe[0]) begin
        failures++;
        if (failures < 10) $display("dut_e mismatch out %0d: got %0d", re, ye);
      end
      if (qe.size() != 0) void'(qe.pop_front());
      re++;
    end
    if (rst_n && ovb) begin
      checks++;
      if (qb.size() == 0 || longint'(yb) != qb[0]) begin
        failures++;
        if (failures < 10) $display("dut_b mismatch out %0d: got %0d", rb, yb);
      end
      if (qb.size() != 0) void'(qb.pop_front());
      rb++;
    end
  end

  initial begin
    va = 0; vb = 0; xa = 0; xb = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < NS; i++) begin
      @(negedge clk);
      va = 1'b1;
      xa = (i % 97 == 50) ? 12'sh7FF : (i % 97 == 51) ? -12'sh800 : 12'($urandom);
      ha[na % HIST] = xa;
      qa.push_back(conv(ha, na, 1));
      qd.push_back(conv(ha, na, 1));
      qc.push_back(conv_c(ha, na));
      na++;
      if (first_in < 0) first_in = cyc;
      vb = ($urandom % 3) != 0;
      xb = 12'($urandom);
      if (vb) begin
        hb[nb % HIST] = xb;
        qb.push_back(conv(hb, nb, 4));
        qe.push_back(conv(hb, nb, 4));
        nb++;
      end
    end
    @(negedge clk);
    va = 1'b0;
    vb = 1'b0;
    // flush dut_b (it only advances on in_valid) with zero samples
    for (int i = 0; i < 10; i++) begin
      @(negedge clk);
      vb = 1'b1; xb = '0;
      hb[nb % HIST] = 0;
      qb.push_back(conv(hb, nb, 4));
      qe.push_back(conv(hb, nb, 4));
      nb++;
    end
    @(negedge clk);
    vb = 1'b0;
    repeat (10) @(posedge clk);
    checks++;
    if (first_out - first_in != 5) begin
      failures++;
      $display("dut_a latency %0d, expected 5", first_out - first_in);
    end
    checks++;
    if (first_out_d - first_in != 24) begin
      failures++;
      $display("dut_d latency %0d, expected 24", first_out_d - first_in);
    end
    checks++;
    if (rd != NS - 23 || re < nb - 5) begin
      failures++;
      $display("output counts d=%0d/%0d e=%0d/%0d", rd, NS, re, nb);
    end
    checks++;
    if (ra != NS - 4 || rb < nb - 4 || rc < NS - 5) begin
      failures++;
      $display("output counts a=%0d/%0d b=%0d/%0d c=%0d", ra, NS, rb, nb, rc);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
