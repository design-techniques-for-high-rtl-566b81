// tb_csd_sop: self-checking test of the multiplierless CSD sum of products.
//   u_a  one input, the default coefficient 393 (= 512 - 128 + 8 + 1);
//   u_b  three inputs, coefficients -42, 505, 0 (a zero coefficient);
//   u_c  two inputs, coefficients -9, 300, pipelined: result 3 edges later.
// For every random input the carry-save outputs plus the MSB-fix constants
// (one of them checked against a
// hand calculation) must equal the exact sum of products modulo 2^W.
module tb_csd_sop;
  import fir_pkg::*;

  localparam int B = 12;
  localparam int W = 26;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  initial #1 rst_n = 1'b0;  // reset edge: the asynchronous resets act at once
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  localparam int CA [1] = '{393};
  localparam int CB [3] = '{-42, 505, 0};
  localparam int CC [2] = '{-9, 300};

  logic signed [B-1:0] xa [1];
  logic signed [B-1:0] xb [3];
  logic signed [B-1:0] xc [2];
  logic [W-1:0] sa, ca, sb, cb, sc, cc;

  csd_sop #(.B(B), .W(W)) u_a (.clk(clk), .rst_n(rst_n), .en(1'b1), .x(xa), .out_s(sa), .out_c(ca));
  csd_sop #(.B(B), .W(W), .NIN(3), .COEF(CB)) u_b (.clk(clk), .rst_n(rst_n), .en(1'b1), .x(xb),
            .out_s(sb), .out_c(cb));
  csd_sop #(.B(B), .W(W), .NIN(2), .COEF(CC), .PIPE(1'b1), .LEVELS(3)) u_c (.clk(clk),
            .rst_n(rst_n), .en(1'b1), .x(xc), .out_s(sc), .out_c(cc));

  // Expected carry-save total for one input: the exact product (computed with
  // '*') minus the MSB-fix constant, which is checked by hand below.
  function automatic logic [W-1:0] expect1(int c, logic signed [B-1:0] x);
    return W'(longint'(c) * longint'(x) - csd_const(c, B));
  endfunction

  logic [W-1:0] pipe_q [$];

  initial begin
    logic [W-1:0] e;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 600; t++) begin
      @(negedge clk);
      xa[0] = (t % 30 == 0) ? -12'sh800 : B'($urandom);
      foreach (xb[i]) xb[i] = (t % 30 == 1) ? 12'sh7FF : B'($urandom);
      foreach (xc[i]) xc[i] = B'($urandom);
      #1;
      checks++;
      if (W'(sa + ca) != expect1(CA[0], xa[0])) begin
        failures++;
        if (failures < 10) $display("u_a x=%0d wrong", xa[0]);
      end
      checks++;
      e = expect1(CB[0], xb[0]) + expect1(CB[1], xb[1]) + expect1(CB[2], xb[2]);
      if (W'(sb + cb) != e) begin
        failures++;
        if (failures < 10) $display("u_b wrong");
      end
      pipe_q.push_back(expect1(CC[0], xc[0]) + expect1(CC[1], xc[1]));
      if (pipe_q.size() > 3) begin
        e = pipe_q.pop_front();
        checks++;
        if (W'(sc + cc) != e) begin
          failures++;
          if (failures < 10) $display("u_c wrong: got %h expected %h", W'(sc + cc), e);
        end
      end
    end
    // the MSB-fix constant itself, worked out by hand for 393 = 2^9 - 2^7 + 2^3 + 2^0:
    // each +term at p gives -2^(B-1+p), the -term at p = 7 gives 2^7 - 2^(B-1+7)
    checks++;
    if (csd_const(393, B) != -(longint'(1) <<< 20) - (longint'(1) <<< 14) - (longint'(1) <<< 11)
                             + (longint'(1) <<< 7) - (longint'(1) <<< 18)) begin
      failures++;
      $display("csd_const(393) = %0d", csd_const(393, B));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
