// tb_vma: self-checking test of the vector merge adder.  Random sum/carry
// pairs are applied; one cycle after en the output must equal
// (s + c) >>> SHIFT as a signed value, and it must hold while en is low.
module tb_vma;
  localparam int W = 24;
  localparam int SHIFT = 3;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  initial #1 rst_n = 1'b0;  // reset edge: the asynchronous resets act at once
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic                      en = 1'b0;
  logic [W-1:0]              s = '0, c = '0;
  logic signed [W-SHIFT-1:0] y;
  logic signed [W-SHIFT-1:0] expv;

  vma #(.W(W), .SHIFT(SHIFT)) dut (.clk(clk), .rst_n(rst_n), .en(en), .s(s), .c(c), .y(y));

  initial begin
    logic [W-1:0] full;
    expv = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      checks++;
      if (y !== expv) begin
        failures++;
        if (failures < 10) $display("cycle %0d: got %0d expected %0d", t, y, expv);
      end
      en = ($urandom % 3) != 0;
      s  = (t % 40 == 0) ? {1'b0, {(W-1){1'b1}}} : W'($urandom);
      c  = (t % 40 == 0) ? W'(1) : W'($urandom);
      full = s + c;
      if (en) expv = (W-SHIFT)'($signed(full) >>> SHIFT);
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
