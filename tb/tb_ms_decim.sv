// tb_ms_decim: self-checking test of the multistage decimator by 8.
//   dut_a  three sections (I1 down 2, I2 down 2, G down 2), input every
//          cycle: out_valid must pulse exactly every 8 cycles once running;
//   dut_b  two sections (I down 4, G down 2), random gaps in in_valid.
// The reference applies each section's down-sampled convolution and 10-bit
// arithmetic shift in turn.
module tb_ms_decim;
  import fir_pkg::*;
  import tb_ref_pkg::*;

  localparam int NS = 2400;

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

  ms_decim dut_a (.clk(clk), .rst_n(rst_n), .in_valid(va), .in_x(xa),
                  .out_valid(ova), .out_y(ya));
  ms_decim #(.NSTAGE(2)) dut_b (.clk(clk), .rst_n(rst_n), .in_valid(vb),
                  .in_x(xb), .out_valid(ovb), .out_y(yb));

  lq_t xa_q, xb_q, ya_q, yb_q, ra, rb;
  iq_t ci, cg, ci1, ci2;
  int  last_a = -1, cyc = 0, bad_gap = 0, gaps = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && ova) begin
      ya_q.push_back(longint'(ya));
      if (last_a >= 0 && va) begin
        gaps++;
        if (cyc - last_a != 8) bad_gap++;
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
    foreach (COEF_I[k])  ci.push_back(COEF_I[k]);
    foreach (COEF_G[k])  cg.push_back(COEF_G[k]);
    foreach (COEF_I1[k]) ci1.push_back(COEF_I1[k]);
    foreach (COEF_I2[k]) ci2.push_back(COEF_I2[k]);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < NS; i++) begin
      @(negedge clk);
      va = 1'b1;
      xa = (i >= 800 && i < 1200) ? (((i / 80) % 2) ? 12'sh7FF : -12'sh800)
                                  : 12'(rand_sample(12));
      xa_q.push_back(longint'(xa));
      vb = ($urandom % 3) != 0;
      xb = 12'(rand_sample(12));
      if (vb) xb_q.push_back(longint'(xb));
    end
    @(negedge clk);
    va = 0; vb = 0;
    repeat (10) @(posedge clk);
    ra = ref_decim(ref_decim(ref_decim(xa_q, ci1, 2, CF), ci2, 2, CF), cg, 2, CF);
    rb = ref_decim(ref_decim(xb_q, ci, 4, CF), cg, 2, CF);
    compare("dut_a", ya_q, ra, NS / 8 - 12);
    compare("dut_b", yb_q, rb, xb_q.size() / 8 - 12);
    checks++;
    if (bad_gap != 0 || gaps < NS / 8 - 15) begin
      failures++;
      $display("dut_a output spacing: %0d of %0d gaps not 8 cycles", bad_gap, gaps);
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
