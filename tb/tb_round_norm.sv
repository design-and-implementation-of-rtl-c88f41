// Testbench of rounding and normalization. An 18-digit non-negative quotient
// and the sign/zero state of the final remainder describe the exact quotient
// Q + s*epsilon (s = -1, 0, +1). The testbench rounds this value to 16
// significant digits with ties to even, independently of the design: with a
// leading zero one digit lies below the kept 16, without it two. It checks
// the 16 output digits, the leading-zero flag and the rounding carry (all
// nines rounding up to 1000...0). Directed cases cover ties, all-nines and
// negative remainders with zero discarded digits.
module tb_round_norm;
  import r100_pkg::*;
  logic [QDIG-1:0][3:0] q;
  logic r_neg, r_zero;
  logic [NDIG-1:0][3:0] c;
  logic lz, carry;
  logic clk = 1'b0;
  int checks = 0, failures = 0, n_tie = 0, n_carry = 0, n_up = 0;
  round_norm dut (.q(q), .r_neg(r_neg), .r_zero(r_zero), .c(c), .lz(lz), .carry(carry));
  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  function automatic logic [127:0] val(input logic [QDIG-1:0][3:0] v);
    logic [127:0] r = 0;
    for (int i = QDIG - 1; i >= 0; i--) r = r * 10 + 128'(v[i]);
    return r;
  endfunction
  function automatic logic [127:0] cval(input logic [NDIG-1:0][3:0] v);
    logic [127:0] r = 0;
    for (int i = NDIG - 1; i >= 0; i--) r = r * 10 + 128'(v[i]);
    return r;
  endfunction
  initial begin
    logic [127:0] qi, base, rem, F, P16;
    int s;
    bit up, exp_lz, exp_carry;
    P16 = 1; for (int i = 0; i < 16; i++) P16 = P16 * 10;
    for (int t = 0; t < 20000; t++) begin
      for (int i = 0; i < QDIG; i++) q[i] = 4'($urandom_range(9));
      if (t % 2 == 0) q[QDIG-1] = 4'd0;
      if (t % 7 == 0) q[1:0] = {4'd5, 4'd0};
      if (t % 11 == 0) q[0] = 4'd5;
      if (t % 13 == 0) for (int i = 1; i < QDIG - 1; i++) q[i] = 4'd9;
      if (t % 17 == 0) q[1:0] = '0;
      if (q[QDIG-1] == 0 && q[QDIG-2] == 0) q[QDIG-2] = 4'd1;
      s = $urandom_range(2) - 1;
      r_neg = (s < 0); r_zero = (s == 0);
      #1;
      qi = val(q);
      exp_lz = (q[QDIG-1] == 0);
      F = exp_lz ? 10 : 100;
      base = qi / F; rem = qi % F;
      if (rem > F / 2) up = 1;
      else if (rem < F / 2) up = 0;
      else if (s != 0) up = (s > 0);
      else begin up = base[0]; n_tie++; end
      base = base + 128'(up);
      exp_carry = (base == P16);
      if (exp_carry) base = P16 / 10;
      if (up) n_up++;
      if (exp_carry) n_carry++;
      checks++;
      if (cval(c) != base || lz != exp_lz || carry != exp_carry) begin
        failures++; $display("round: q=%h s=%0d got %h lz=%b cy=%b", q, s, c, lz, carry);
      end
    end
    checks += 2;
    if (n_tie == 0)   begin failures++; $display("no tie"); end
    if (n_carry == 0) begin failures++; $display("no rounding carry"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
