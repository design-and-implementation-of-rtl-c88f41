// Testbench of the BCD doubler (x2 multiple of a BCD number, no carry
// propagation). Random N-digit inputs whose top digit is small enough for the
// product to fit are multiplied; the result must equal 2*a as a decimal
// number and consist of BCD digits.
module tb_bcd_doubler;
  localparam int N = 20;
  logic [N-1:0][3:0] a, y;
  logic clk = 1'b0;
  int checks = 0, failures = 0;
  bcd_doubler #(.N(N)) dut (.a(a), .y(y));
  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  function automatic logic [127:0] val(input logic [N-1:0][3:0] v);
    logic [127:0] r = 0;
    for (int i = N - 1; i >= 0; i--) r = r * 10 + 128'(v[i]);
    return r;
  endfunction
  initial begin
    for (int t = 0; t < 5000; t++) begin
      for (int i = 0; i < N; i++) a[i] = 4'($urandom_range(9));
      a[N-1] = 4'($urandom_range(1));
      if (t < 4) for (int i = 0; i < N - 1; i++) a[i] = 4'(9 - t);
      #1;
      checks++;
      if (val(y) != 2 * val(a)) begin failures++; $display("x2 mismatch a=%h y=%h", a, y); end
      for (int i = 0; i < N; i++) if (y[i] > 4'd9) begin failures++; $display("non-BCD digit"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
