// Testbench of the digit-wise 9's complement ("Negative" block): for random
// BCD inputs, a + y must be the all-nines number and every output digit BCD.
module tb_bcd_nines_comp;
  localparam int N = 23;
  logic [N-1:0][3:0] a, y;
  logic clk = 1'b0;
  int checks = 0, failures = 0;
  bcd_nines_comp #(.N(N)) dut (.a(a), .y(y));
  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int t = 0; t < 2000; t++) begin
      for (int i = 0; i < N; i++) a[i] = 4'($urandom_range(9));
      #1;
      for (int i = 0; i < N; i++) begin
        checks++;
        if (int'(a[i]) + int'(y[i]) != 9) begin failures++; $display("digit %0d: %0d -> %0d", i, a[i], y[i]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
