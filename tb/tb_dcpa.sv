// Testbench of the decimal carry-propagate adder: random BCD operands are
// added and the sum must be (a + b) mod 10^N; cy[i] must be the carry out of
// digit i, recomputed digit by digit in the testbench. A watchdog bounds the
// run.
module tb_dcpa;
  localparam int N = 23;
  logic [N-1:0][3:0] a, b, s;
  logic [N-1:0]      cy;
  logic clk = 1'b0;
  int checks = 0, failures = 0;
  dcpa #(.N(N)) dut (.a(a), .b(b), .s(s), .cy(cy));
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
  logic [127:0] M, pa, pb, m;
  logic exp_cy;
  initial begin
    M = 1; for (int i = 0; i < N; i++) M = M * 10;
    for (int t = 0; t < 5000; t++) begin
      for (int i = 0; i < N; i++) begin
        a[i] = 4'($urandom_range(9));
        b[i] = (t % 3 == 0) ? 4'(9 - a[i]) : 4'($urandom_range(9));
        if (t % 3 == 1) b[i] = {3'b000, 1'($urandom)};
      end
      if (t % 3 == 0) b[0] = 4'd0 + 4'($urandom_range(1));
      #1;
      checks++;
      if (val(s) != (val(a) + val(b)) % M) begin
        failures++; $display("dcpa sum mismatch a=%h b=%h s=%h", a, b, s);
      end
      m = 1;
      for (int i = 0; i < N; i++) begin
        m = m * 10;
        pa = val(a) % m; pb = val(b) % m;
        exp_cy = (pa + pb) >= m;
        if (cy[i] != exp_cy) begin failures++; $display("carry %0d wrong", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
