// tb_tdf_decim: self-checking test of the folded polyphase decimator.
//   dut_a  M = 2, model filter G (19 taps), pipelined trees, input every
//          cycle: out_valid must pulse exactly every 2 cycles once running;
//   dut_b  M = 3 (19 taps do not fill the last chain tap), combinational
//          trees, random gaps in in_valid.
// Every output is compared with a direct down-sampled convolution.
module tb_tdf_decim;
  import fir_pkg::*;
  import tb_ref_pkg::*;

  localparam int NS = 900;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  initial #1 rst_n = 1'b0;  // reset edge: the asynchronous resets act at once
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic               va = 0, vb = 0, ova, ovb;
  logic signed [11:0] xa = 0, xb = 0;
  logic signed [23:0] ya, yb;

  tdf_decim dut_a (.clk(clk), .rst_n(rst_n), .in_valid(va), .in_x(xa),
                   .out_valid(ova), .out_y(ya));
  tdf_decim #(.M(3), .PIPE(1'b0)) dut_b (.clk(clk), .rst_n(rst_n), .in_valid(vb),
                   .in_x(xb), .out_valid(ovb), .out_y(yb));

  lq_t xa_q, xb_q, ya_q, yb_q, ra, rb;
  iq_t cg;
  int  last_a = -1, cyc = 0, bad_gap = 0, gaps = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && ova) begin
      ya_q.push_back(longint'(ya));
      if (last_a >= 0 && va) begin
        gaps++;
        if (cyc - last_a != 2) bad_gap++;
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
    foreach (COEF_G[k]) cg.push_back(COEF_G[k]);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < NS + 40; i++) begin
      @(negedge clk);
      va = 1'b1;
      xa = (i < NS) ? 12'(rand_sample(12)) : '0;
      xa_q.push_back(longint'(xa));
      vb = ($urandom % 4) != 0;
      xb = (i < NS) ? 12'(rand_sample(12)) : '0;
      if (vb) xb_q.push_back(longint'(xb));
    end
    @(negedge clk);
    va = 0; vb = 0;
    repeat (10) @(posedge clk);
    ra = ref_decim(xa_q, cg, 2, 0);
    rb = ref_decim(xb_q, cg, 3, 0);
    compare("dut_a", ya_q, ra, NS / 2);
    compare("dut_b", yb_q, rb, (NS * 3 / 4) / 3 - 20);
    checks++;
    if (bad_gap != 0 || gaps < NS / 2 - 10) begin
      failures++;
      $display("dut_a output spacing: %0d of %0d gaps not 2 cycles", bad_gap, gaps);
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
