// tb_tdf_interp: self-checking test of the polyphase interpolator with
// mirror symmetric filter pairs.
//   dut_a  L = 2, model filter G (19 taps), pipelined trees, STRIDE 1, an
//          input every 2 cycles: out_valid must then be high every cycle;
//   dut_b  L = 3, combinational trees, STRIDE 2, inputs 6 to 9 cycles apart;
//   dut_c  L = 2 with an anti-symmetric 10-tap set (shared negated products),
//          same input as dut_a.
// Outputs are compared with a direct convolution of the zero-stuffed input.
module tb_tdf_interp;
  import fir_pkg::*;
  import tb_ref_pkg::*;

  localparam int NS = 400;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  initial #1 rst_n = 1'b0;  // reset edge: the asynchronous resets act at once
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic               va = 0, vb = 0, ova, ovb;
  logic signed [11:0] xa = 0, xb = 0;
  logic signed [23:0] ya, yb;

  tdf_interp dut_a (.clk(clk), .rst_n(rst_n), .in_valid(va), .in_x(xa),
                    .out_valid(ova), .out_y(ya));
  tdf_interp #(.L(3), .PIPE(1'b0), .STRIDE(2)) dut_b (.clk(clk), .rst_n(rst_n),
                    .in_valid(vb), .in_x(xb), .out_valid(ovb), .out_y(yb));

  // anti-symmetric set for dut_c; output width acc_width(12, 938) = 23
  localparam int COEF_C [10] = '{-7, 19, -45, 98, -300, 300, -98, 45, -19, 7};
  logic               ovc;
  logic signed [22:0] yc;
  tdf_interp #(.N(10), .COEF(COEF_C)) dut_c (.clk(clk), .rst_n(rst_n),
                    .in_valid(va), .in_x(xa), .out_valid(ovc), .out_y(yc));

  lq_t xa_q, xb_q, ya_q, yb_q, yc_q, ra, rb, rc;
  iq_t cg, cc;
  int  last_a = -1, cyc = 0, bad_gap = 0, gaps = 0;
  bit  a_running = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && ova) begin
      ya_q.push_back(longint'(ya));
      if (last_a >= 0 && a_running) begin
        gaps++;
        if (cyc - last_a != 1) bad_gap++;
      end
      last_a = cyc;
    end
    if (rst_n && ovb) yb_q.push_back(longint'(yb));
    if (rst_n && ovc) yc_q.push_back(longint'(yc));
  end

  task automatic compare(string name, lq_t got, lq_t exp, int need);
    checks++;
    if (got.size() < need) begin
      failures++;
      $display("%s: %0d outputs, expected at least %0d", name, got.size(), need);
    end
    for (int i = 0; i < got.size() && i < exp.size(); i++) begin
      checks++;
      if (got[i] != exp[i]) begin
        failures++;
        if (failures < 10) $display("%s out %0d: got %0d expected %0d", name, i, got[i], exp[i]);
      end
    end
  endtask

  // dut_a: one sample every 2 cycles
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < NS; i++) begin
      @(negedge clk);
      va = 1'b1;
      xa = (i < NS - 20) ? 12'(rand_sample(12)) : '0;
      xa_q.push_back(longint'(xa));
      if (i == 8) a_running = 1;
      if (i == NS - 2) a_running = 0;
      @(negedge clk);
      va = 1'b0;
    end
  end

  // dut_b: one sample every 6..9 cycles
  initial begin
    repeat (3) @(posedge clk);
    for (int i = 0; i < NS; i++) begin
      @(negedge clk);
      vb = 1'b1;
      xb = (i < NS - 20) ? 12'(rand_sample(12)) : '0;
      xb_q.push_back(longint'(xb));
      @(negedge clk);
      vb = 1'b0;
      repeat (4 + $urandom % 4) @(negedge clk);
    end
  end

  initial begin
    cg = {};
    foreach (COEF_G[k]) cg.push_back(COEF_G[k]);
    cc = {};
    foreach (COEF_C[k]) cc.push_back(COEF_C[k]);
    repeat (NS * 10 + 50) @(posedge clk);
    ra = ref_interp(xa_q, cg, 2, 0);
    rb = ref_interp(xb_q, cg, 3, 0);
    rc = ref_interp(xa_q, cc, 2, 0);
    compare("dut_a", ya_q, ra, 2 * (NS - 10));
    compare("dut_b", yb_q, rb, 3 * (NS - 10));
    compare("dut_c", yc_q, rc, 2 * (NS - 10));
    checks++;
    if (bad_gap != 0 || gaps < 2 * NS - 40) begin
      failures++;
      $display("dut_a output spacing: %0d of %0d gaps not 1 cycle", bad_gap, gaps);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NS * 12 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
