// tb_ms_interp: self-checking test of the multistage interpolator by 8.
//   dut_a  three sections (G up 2, I2 up 2, I1 up 2), an input every 8
//          cycles: once running, out_valid must be high every cycle;
//   dut_b  two sections (G up 2, I up 4), inputs 8 to 11 cycles apart.
// The reference zero-stuffs and convolves section by section with the same
// arithmetic shifts (CF-1 per up-by-2 section, CF-2 for up-by-4).
module tb_ms_interp;
  import fir_pkg::*;
  import tb_ref_pkg::*;

  localparam int NS = 300;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  initial #1 rst_n = 1'b0;  // reset edge: the asynchronous resets act at once
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic               va = 0, vb = 0, ova, ovb;
  logic signed [11:0] xa = 0, xb = 0;
  logic signed [20:0] ya;
  logic signed [17:0] yb;

  ms_interp dut_a (.clk(clk), .rst_n(rst_n), .in_valid(va), .in_x(xa),
                   .out_valid(ova), .out_y(ya));
  ms_interp #(.NSTAGE(2)) dut_b (.clk(clk), .rst_n(rst_n), .in_valid(vb),
                   .in_x(xb), .out_valid(ovb), .out_y(yb));

  lq_t xa_q, xb_q, ya_q, yb_q, ra, rb;
  iq_t ci, cg, ci1, ci2;
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

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < NS; i++) begin
      @(negedge clk);
      va = 1'b1;
      xa = (i < NS - 20) ? 12'(rand_sample(12)) : '0;
      xa_q.push_back(longint'(xa));
      if (i == 10) a_running = 1;
      if (i == NS - 2) a_running = 0;
      @(negedge clk);
      va = 1'b0;
      repeat (6) @(negedge clk);
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    for (int i = 0; i < NS; i++) begin
      @(negedge clk);
      vb = 1'b1;
      xb = (i < NS - 20) ? 12'(rand_sample(12)) : '0;
      xb_q.push_back(longint'(xb));
      @(negedge clk);
      vb = 1'b0;
      repeat (6 + $urandom % 4) @(negedge clk);
    end
  end

  initial begin
    foreach (COEF_I[k])  ci.push_back(COEF_I[k]);
    foreach (COEF_G[k])  cg.push_back(COEF_G[k]);
    foreach (COEF_I1[k]) ci1.push_back(COEF_I1[k]);
    foreach (COEF_I2[k]) ci2.push_back(COEF_I2[k]);
    repeat (NS * 12 + 50) @(posedge clk);
    ra = ref_interp(ref_interp(ref_interp(xa_q, cg, 2, CF - 1), ci2, 2, CF - 1), ci1, 2, CF - 1);
    rb = ref_interp(ref_interp(xb_q, cg, 2, CF - 1), ci, 4, CF - 2);
    compare("dut_a", ya_q, ra, 8 * (NS - 10));
    compare("dut_b", yb_q, rb, 8 * (NS - 10));
    checks++;
    if (bad_gap != 0 || gaps < 8 * NS - 200) begin
      failures++;
      $display("dut_a output spacing: %0d of %0d gaps not 1 cycle", bad_gap, gaps);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NS * 14 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
