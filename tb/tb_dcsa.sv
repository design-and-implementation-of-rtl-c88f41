// Testbench of the decimal carry-save adder. Random BCD vectors x, y and
// carry-in bits are added; the outputs must be valid BCD digits and
// x + y + ci must equal s + co as N-digit numbers (modulo 10^N, the carry
// out of the top digit is discarded by design). A watchdog bounds the run.
module tb_dcsa;
  localparam int N = 23;
  logic [N-1:0][3:0] x, y, s;
  logic [N-1:0]      ci, co;
  logic clk = 1'b0;
  int checks = 0, failures = 0;
  dcsa #(.N(N)) dut (.x(x), .y(y), .ci(ci), .s(s), .co(co));
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
  function automatic logic [127:0] cval(input logic [N-1:0] v);
    logic [127:0] r = 0;
    for (int i = N - 1; i >= 0; i--) r = r * 10 + 128'(v[i]);
    return r;
  endfunction
  logic [127:0] M;
  initial begin
    M = 1; for (int i = 0; i < N; i++) M = M * 10;
    for (int t = 0; t < 5000; t++) begin
      for (int i = 0; i < N; i++) begin
        x[i] = 4'($urandom_range(9)); y[i] = 4'($urandom_range(9)); ci[i] = 1'($urandom);
        if (t < 10) begin x[i] = 4'd9; y[i] = 4'd9; ci[i] = 1'b1; end
      end
      #1;
      checks++;
      if ((val(x) + val(y) + cval(ci)) % M != (val(s) + cval(co)) % M ||
          co[0] != 1'b0) begin
        failures++;
        $display("dcsa mismatch x=%h y=%h ci=%h s=%h co=%h", x, y, ci, s, co);
      end
      for (int i = 0; i < N; i++) if (s[i] > 4'd9) begin failures++; $display("non-BCD sum digit"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
