// tb_ifir_filter: self-checking test of the single-rate IFIR filter.
//   dut_a  I1(z) I2(z^2) G(z^4), a sample every cycle; once the pipeline is
//          full out_valid must stay high (one output per input);
//   dut_b  I(z) G(z^4), random gaps in in_valid.
// The reference is a cascade of direct convolutions, each followed by the
// same 10-bit arithmetic shift the hardware applies between sections.
module tb_ifir_filter;
  import fir_pkg::*;
  import tb_ref_pkg::*;

  localparam int NS = 800;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  initial #1 rst_n = 1'b0;  // reset edge: the asynchronous resets act at once
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic               va = 0, vb = 0, ova, ovb;
  logic signed [11:0] xa = 0, xb = 0;
  logic signed [17:0] ya;
  logic signed [15:0] yb;

  ifir_filter dut_a (.clk(clk), .rst_n(rst_n), .in_valid(va), .in_x(xa),
                     .out_valid(ova), .out_y(ya));
  ifir_filter #(.IMG_STAGES(1)) dut_b (.clk(clk), .rst_n(rst_n), .in_valid(vb),
                     .in_x(xb), .out_valid(ovb), .out_y(yb));

  lq_t xa_q, xb_q, ya_q, yb_q, ra, rb;
  iq_t ci, cg, ci1, ci2;
  int  run = 0, breaks = 0;
  bit  prev_ova = 0;

  always @(posedge clk) begin
    if (rst_n && ova) ya_q.push_back(longint'(ya));
    if (rst_n && ovb) yb_q.push_back(longint'(yb));
    if (rst_n && va && prev_ova && !ova) breaks++;
    prev_ova <= rst_n && ova;
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
    foreach (COEF_I[k])  ci.push_back(COEF_I[k]);
    foreach (COEF_G[k])  cg.push_back(COEF_G[k]);
    foreach (COEF_I1[k]) ci1.push_back(COEF_I1[k]);
    foreach (COEF_I2[k]) ci2.push_back(COEF_I2[k]);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < NS; i++) begin
      @(negedge clk);
      va = 1'b1;
      // a slow full-scale square wave in part of the run exercises the peaks
      xa = (i >= 200 && i < 400) ? (((i / 40) % 2) ? 12'sh7FF : -12'sh800)
                                 : 12'(rand_sample(12));
      xa_q.push_back(longint'(xa));
      vb = ($urandom % 3) != 0;
      xb = 12'(rand_sample(12));
      if (vb) xb_q.push_back(longint'(xb));
    end
    @(negedge clk);
    va = 0; vb = 0;
    repeat (10) @(posedge clk);
    ra = ref_fir(ref_fir(ref_fir(xa_q, ci1, 1, CF), ci2, 2, CF), cg, 4, CF);
    rb = ref_fir(ref_fir(xb_q, ci, 1, CF), cg, 4, CF);
    compare("dut_a", ya_q, ra, NS - 20);
    compare("dut_b", yb_q, rb, xb_q.size() - 20);
    checks++;
    if (breaks != 0) begin
      failures++;
      $display("dut_a: out_valid dropped %0d times during continuous input", breaks);
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
