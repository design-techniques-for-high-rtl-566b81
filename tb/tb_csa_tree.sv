// tb_csa_tree: self-checking test of the carry-save reduction tree.  Four
// instances (1, 2 and 7 addends combinational; 9 addends pipelined and padded
// to 6 levels) get random addends; the sum of the two outputs must equal the
// sum of the addends modulo 2^W, for the pipelined tree exactly 6 enabled
// cycles later.  en is dropped at random to check that the pipeline holds.
module tb_csa_tree;
  localparam int W = 20;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  initial #1 rst_n = 1'b0;  // reset edge: the asynchronous resets act at once
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic [W-1:0] v1 [1];
  logic [W-1:0] v2 [2];
  logic [W-1:0] v7 [7];
  logic [W-1:0] v9 [9];
  logic [W-1:0] s1, c1, s2, c2, s7, c7, s9, c9;
  logic         en = 1'b0;

  csa_tree #(.W(W), .NV(1)) u1 (.clk(clk), .rst_n(rst_n), .en(1'b1), .in_v(v1), .out_s(s1), .out_c(c1));
  csa_tree #(.W(W), .NV(2)) u2 (.clk(clk), .rst_n(rst_n), .en(1'b1), .in_v(v2), .out_s(s2), .out_c(c2));
  csa_tree #(.W(W), .NV(7)) u7 (.clk(clk), .rst_n(rst_n), .en(1'b1), .in_v(v7), .out_s(s7), .out_c(c7));
  csa_tree #(.W(W), .NV(9), .PIPE(1'b1), .LEVELS(6)) u9 (.clk(clk), .rst_n(rst_n), .en(en),
             .in_v(v9), .out_s(s9), .out_c(c9));

  logic [W-1:0] exp9 [$];

  function automatic logic [W-1:0] sum_of(logic [W-1:0] v [], int n);
    logic [W-1:0] s;
    s = '0;
    for (int i = 0; i < n; i++) s += v[i];
    return s;
  endfunction

  initial begin
    logic [W-1:0] tmp [];
    logic [W-1:0] e;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      // combinational trees: check right away
      foreach (v1[i]) v1[i] = W'($urandom);
      foreach (v2[i]) v2[i] = W'($urandom);
      foreach (v7[i]) v7[i] = (t % 50 == 0) ? '1 : W'($urandom);
      #1;
      tmp = new[1]; foreach (v1[i]) tmp[i] = v1[i];
      checks++; if (W'(s1 + c1) != sum_of(tmp, 1)) begin failures++; $display("NV=1 wrong"); end
      tmp = new[2]; foreach (v2[i]) tmp[i] = v2[i];
      checks++; if (W'(s2 + c2) != sum_of(tmp, 2)) begin failures++; $display("NV=2 wrong"); end
      tmp = new[7]; foreach (v7[i]) tmp[i] = v7[i];
      checks++; if (W'(s7 + c7) != sum_of(tmp, 7)) begin failures++; $display("NV=7 wrong"); end
      // pipelined tree: the output after 6 enabled edges
      en = ($urandom % 4) != 0;
      foreach (v9[i]) v9[i] = W'($urandom);
      if (en) begin
        tmp = new[9]; foreach (v9[i]) tmp[i] = v9[i];
        exp9.push_back(sum_of(tmp, 9));
        if (exp9.size() > 6) begin
          e = exp9.pop_front();
          checks++;
          if (W'(s9 + c9) != e) begin
            failures++;
            if (failures < 10) $display("NV=9 pipelined: got %h expected %h", W'(s9 + c9), e);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
