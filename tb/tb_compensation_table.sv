// Testbench of the compensation table. For random compact D' values (in the
// W-digit frame) and all nine combinations of the two compensation signals,
// the carry-save output must equal (100*comp_h + 10*comp_l) * D' modulo
// 10^W. The +-110D' inputs are given as correct carry-save values built by
// the testbench from random splits. As in the divider, the two lowest
// digits of D' are zero (it has at most W-3 fractional digits).
module tb_compensation_table;
  import r100_pkg::*;
  logic signed [1:0] ch, cl;
  logic [W-1:0][3:0] d1, ps, ns, sum;
  logic [W-1:0]      pc, nc, carry;
  logic clk = 1'b0;
  int checks = 0, failures = 0;
  compensation_table dut (.comp_h(ch), .comp_l(cl), .d1(d1), .p110_s(ps), .p110_c(pc),
                          .n110_s(ns), .n110_c(nc), .sum(sum), .carry(carry));
  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  function automatic logic [127:0] val(input logic [W-1:0][3:0] v);
    logic [127:0] r = 0;
    for (int i = W - 1; i >= 0; i--) r = r * 10 + 128'(v[i]);
    return r;
  endfunction
  function automatic logic [127:0] cval(input logic [W-1:0] v);
    logic [127:0] r = 0;
    for (int i = W - 1; i >= 0; i--) r = r * 10 + 128'(v[i]);
    return r;
  endfunction
  function automatic logic [W-1:0][3:0] bcd(input logic [127:0] n);
    logic [W-1:0][3:0] r;
    for (int i = 0; i < W; i++) begin r[i] = 4'(n % 10); n = n / 10; end
    return r;
  endfunction
  logic [127:0] M, dv, expv, cs;
  initial begin
    M = 1; for (int i = 0; i < W; i++) M = M * 10;
    for (int t = 0; t < 500; t++) begin
      // D' in [1, 1.0102): digit W-1 is 1, next two digits 0/1 and 0
      d1 = '0;
      for (int i = 0; i < W - 4; i++) d1[i] = 4'($urandom_range(9));
      d1[W-1] = 4'd1; d1[W-3] = 4'($urandom_range(1));
      d1[1:0] = '0;   // D' has at most W-3 fractional digits
      dv = val(d1);
      // carry-save forms of +-110 D': a random carry vector and the rest as sum
      pc = {W{1'b0}}; nc = {W{1'b0}};
      for (int i = 1; i < W; i++) begin pc[i] = 1'($urandom); nc[i] = 1'($urandom); end
      ps = bcd((110 * dv + M - cval(pc) % M) % M);
      ns = bcd((M - (110 * dv) % M + M - cval(nc) % M) % M);
      for (int a = -1; a <= 1; a++)
        for (int b = -1; b <= 1; b++) begin
          if (a != b && a != 0 && b != 0) continue;   // +-(100 - 10) never requested
          ch = 2'(a); cl = 2'(b);
          #1;
          if (a * 100 + b * 10 < 0) cs = (M - (128'(-(100 * a + 10 * b)) * dv) % M) % M;
          else cs = (128'(100 * a + 10 * b) * dv) % M;
          checks++;
          if ((val(sum) + cval(carry)) % M != cs) begin
            failures++; $display("comp %0d,%0d wrong: D'=%h sum=%h carry=%h", a, b, d1, sum, carry);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
