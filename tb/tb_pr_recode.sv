// Testbench of the remainder recoding logic: a BCD sum with 2-bit carries
// (0..2 per digit) is turned into BCD digits with 1-bit carries. The value
// sum + carries must be preserved modulo 10^W, outputs must be BCD, and the
// lowest output carry must be 0.
module tb_pr_recode;
  localparam int W = 23;
  logic [W-1:0][3:0] s, s1;
  logic [W-1:0][1:0] c;
  logic [W-1:0]      c1;
  logic clk = 1'b0;
  int checks = 0, failures = 0;
  pr_recode #(.W(W)) dut (.s(s), .c(c), .s1(s1), .c1(c1));
  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic [127:0] M, v0, v1;
  initial begin
    M = 1; for (int i = 0; i < W; i++) M = M * 10;
    for (int t = 0; t < 5000; t++) begin
      for (int i = 0; i < W; i++) begin
        s[i] = 4'($urandom_range(9)); c[i] = 2'($urandom_range(2));
        if (t < 5) begin s[i] = 4'd9; c[i] = 2'd2; end
      end
      #1;
      v0 = 0; v1 = 0;
      for (int i = W - 1; i >= 0; i--) begin
        v0 = v0 * 10 + 128'(s[i]) + 128'(c[i]);
        v1 = v1 * 10 + 128'(s1[i]) + 128'(c1[i]);
      end
      checks++;
      if (v0 % M != v1 % M || c1[0]) begin failures++; $display("recode mismatch s=%h c=%h", s, c); end
      for (int i = 0; i < W; i++) if (s1[i] > 4'd9) begin failures++; $display("non-BCD digit"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
