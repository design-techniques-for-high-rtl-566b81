// tb_mmfir_top: end-to-end test of the whole design at its default sizes.
// The three engines run at the same time on independent random 12-bit
// streams (with full-scale square-wave stretches):
//   IFIR filter      one sample per cycle with random pauses in in_valid;
//   decimator by 8   one sample per cycle;
//   interpolator     one sample every 8 cycles, 8 outputs per sample.
// Every output is compared with a bit-true cascade of direct convolutions.
// The test also counts how often each mechanism occurred and fails if one
// never did: a pipeline hold in the IFIR filter (in_valid low), a decimator
// block completing in each of the three sections, each interpolator section
// commutating a full set of phases, and the output rates (exactly one
// decimator output per 8 inputs, interpolator output every cycle).
module tb_mmfir_top;
  import fir_pkg::*;
  import tb_ref_pkg::*;

  localparam int NF = 1200;   // IFIR input samples
  localparam int ND = 3200;   // decimator input samples
  localparam int NI = 400;    // interpolator input samples

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  initial #1 rst_n = 1'b0;  // reset edge: the asynchronous resets act at once
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic               fv = 0, dv = 0, iv = 0;
  logic signed [11:0] fx = 0, dx = 0, ix = 0;
  logic               fov, dov, iov;
  logic signed [17:0] fy, dy;
  logic signed [20:0] iy;

  mmfir_top dut (
    .clk(clk), .rst_n(rst_n),
    .ifir_in_valid(fv), .ifir_in_x(fx), .ifir_out_valid(fov), .ifir_out_y(fy),
    .dec_in_valid(dv),  .dec_in_x(dx),  .dec_out_valid(dov),  .dec_out_y(dy),
    .int_in_valid(iv),  .int_in_x(ix),  .int_out_valid(iov),  .int_out_y(iy));

  lq_t fx_q, dx_q, ix_q, fy_q, dy_q, iy_q, rf, rd, ri;
  iq_t cg, ci1, ci2;

  // mechanism counters
  int n_hold = 0, n_dec1 = 0, n_dec2 = 0, n_dec3 = 0;
  int n_int1 = 0, n_int2 = 0, n_int3 = 0;
  int cyc = 0, last_d = -1, bad_d = 0, last_i = -1, bad_i = 0, i_run = 0;
  bit f_started = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (fov) begin fy_q.push_back(longint'(fy)); f_started = 1; end
      if (f_started && !fv && fy_q.size() < NF - 40) n_hold++;
      if (dov) begin
        dy_q.push_back(longint'(dy));
        if (last_d >= 0 && dv && cyc - last_d != 8) bad_d++;
        last_d = cyc;
      end
      if (iov) begin
        iy_q.push_back(longint'(iy));
        if (last_i >= 0 && i_run != 0 && cyc - last_i != 1) bad_i++;
        last_i = cyc;
      end
      if (dut.u_dec.g_three.v1) n_dec1++;
      if (dut.u_dec.g_three.v2) n_dec2++;
      if (dov) n_dec3++;
      if (dut.u_int.g_three.u_s1.start) n_int1++;
      if (dut.u_int.g_three.u_s2.start) n_int2++;
      if (dut.u_int.g_three.u_s3.start) n_int3++;
    end
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

  task automatic need(string what, int n, int min);
    checks++;
    $display("  %-34s %0d", what, n);
    if (n < min) begin
      failures++;
      $display("  ... expected at least %0d", min);
    end
  endtask

  function automatic logic signed [11:0] stim(int i, int period);
    if ((i / (8 * period)) % 3 == 1) return (((i / period) % 2) != 0) ? 12'sh7FF : -12'sh800;
    return 12'(rand_sample(12));
  endfunction

  // IFIR stream
  initial begin
    repeat (3) @(posedge clk);
    for (int i = 0; i < NF; ) begin
      @(negedge clk);
      fv = (i < 100) || (($urandom % 5) != 0);
      if (fv) begin
        fx = stim(i, 30);
        fx_q.push_back(longint'(fx));
        i++;
      end
    end
    @(negedge clk);
    fv = 1'b0;
  end

  // decimator stream
  initial begin
    repeat (3) @(posedge clk);
    for (int i = 0; i < ND; i++) begin
      @(negedge clk);
      dv = 1'b1;
      dx = stim(i, 64);
      dx_q.push_back(longint'(dx));
    end
    @(negedge clk);
    dv = 1'b0;
  end

  // interpolator stream: one sample every 8 cycles
  initial begin
    repeat (3) @(posedge clk);
    for (int i = 0; i < NI; i++) begin
      @(negedge clk);
      iv = 1'b1;
      ix = (i < NI - 20) ? stim(i, 6) : '0;
      ix_q.push_back(longint'(ix));
      if (i == 12) i_run = 1;
      if (i == NI - 2) i_run = 0;
      @(negedge clk);
      iv = 1'b0;
      repeat (6) @(negedge clk);
    end
  end

  initial begin
    @(negedge rst_n);
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    repeat (NI * 8 + 100) @(posedge clk);
    foreach (COEF_G[k])  cg.push_back(COEF_G[k]);
    foreach (COEF_I1[k]) ci1.push_back(COEF_I1[k]);
    foreach (COEF_I2[k]) ci2.push_back(COEF_I2[k]);
    rf = ref_fir(ref_fir(ref_fir(fx_q, ci1, 1, CF), ci2, 2, CF), cg, 4, CF);
    rd = ref_decim(ref_decim(ref_decim(dx_q, ci1, 2, CF), ci2, 2, CF), cg, 2, CF);
    ri = ref_interp(ref_interp(ref_interp(ix_q, cg, 2, CF - 1), ci2, 2, CF - 1), ci1, 2, CF - 1);
    compare("ifir", fy_q, rf, NF - 30);
    compare("decimator", dy_q, rd, ND / 8 - 12);
    compare("interpolator", iy_q, ri, 8 * (NI - 10));
    $display("mechanisms:");
    need("IFIR pipeline holds (in_valid low)", n_hold, 1);
    need("decimator section 1 outputs", n_dec1, ND / 2 - 20);
    need("decimator section 2 outputs", n_dec2, ND / 4 - 20);
    need("decimator section 3 outputs", n_dec3, ND / 8 - 20);
    need("interpolator section 1 phase sets", n_int1, NI - 10);
    need("interpolator section 2 phase sets", n_int2, 2 * NI - 20);
    need("interpolator section 3 phase sets", n_int3, 4 * NI - 40);
    checks++;
    if (bad_d != 0 || bad_i != 0) begin
      failures++;
      $display("output rate broken: decimator %0d, interpolator %0d irregular gaps", bad_d, bad_i);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NI * 8 + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
