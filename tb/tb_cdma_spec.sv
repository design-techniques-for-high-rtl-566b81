// tb_cdma_spec: checks the channel-filter specification on the hardware.
// Pure tones of amplitude 1800 (12-bit input) are applied to the IFIR
// filter (ifir_filter, default sections) and to the decimator by 8
// (ms_decim, default sections), one tone at a time, each for 3600 clocks.
// The gain at each tone is measured by correlating the settled output with a
// complex exponential at the output frequency (for the decimator the tone
// frequency times 8, folded), and compared with the specification:
//   passband tones (<= 0.064 pi): gain within +-0.15 dB of unity
//     (0.1 dB ripple allowed, plus margin for measurement and truncation);
//   stopband tones (>= 0.125 pi): gain at most -40 dB.
module tb_cdma_spec;
  import fir_pkg::*;

  localparam int    NT  = 3600;
  localparam real   AMP = 1800.0;
  localparam real   PI  = 3.14159265358979;
  localparam int    NTONE = 8;
  // tone frequencies in units of pi, and whether they lie in the passband
  localparam real   FREQ [NTONE] = '{0.02, 0.05, 0.062, 0.13, 0.2, 0.37, 0.7, 0.93};
  localparam bit    PASS [NTONE] = '{1, 1, 1, 0, 0, 0, 0, 0};

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  initial #1 rst_n = 1'b0;  // reset edge: the asynchronous resets act at once
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic               v = 1'b0;
  logic signed [11:0] x = '0;
  logic               fov, dov;
  logic signed [17:0] fy, dy;

  ifir_filter u_f (.clk(clk), .rst_n(rst_n), .in_valid(v), .in_x(x), .out_valid(fov), .out_y(fy));
  ms_decim    u_d (.clk(clk), .rst_n(rst_n), .in_valid(v), .in_x(x), .out_valid(dov), .out_y(dy));

  real fq [$];
  real dq [$];

  always @(posedge clk) begin
    if (rst_n && fov) fq.push_back(real'(fy));
    if (rst_n && dov) dq.push_back(real'(dy));
  end

  // gain in dB of the last k samples of q at frequency w (radians/sample)
  function automatic real gain_db(real q [$], int k, real w);
    real re, im, a;
    int  n0;
    re = 0.0;
    im = 0.0;
    n0 = q.size() - k;
    for (int i = 0; i < k; i++) begin
      re += q[n0 + i] * $cos(w * i);
      im -= q[n0 + i] * $sin(w * i);
    end
    a = 2.0 * $sqrt(re * re + im * im) / k;
    return 20.0 * $log10((a + 1.0e-9) / AMP);
  endfunction

  task automatic judge(string name, int t, real g);
    checks++;
    if (PASS[t] ? (g > 0.15 || g < -0.15) : (g > -40.0)) begin
      failures++;
      $display("%s tone %0.3f pi: gain %0.3f dB out of specification", name, FREQ[t], g);
    end else begin
      $display("%s tone %0.3f pi: gain %0.3f dB", name, FREQ[t], g);
    end
  endtask

  initial begin
    real w, wd;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < NTONE; t++) begin
      fq.delete();
      dq.delete();
      w = FREQ[t] * PI;
      for (int n = 0; n < NT; n++) begin
        @(negedge clk);
        v = 1'b1;
        x = 12'(int'(AMP * $cos(w * n)));
      end
      // decimator output frequency: 8w folded into [0, pi]
      wd = 8.0 * w;
      while (wd > 2.0 * PI) wd -= 2.0 * PI;
      if (wd > PI) wd = 2.0 * PI - wd;
      judge("ifir_filter", t, gain_db(fq, 2000, w));
      judge("ms_decim   ", t, gain_db(dq, 400, wd));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NTONE * NT + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
