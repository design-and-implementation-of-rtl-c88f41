// Testbench of the iteration module on its own. The testbench plays the
// controller and the pre-scaler: it feeds a scaled divisor D' in
// [1, 1 + 1/99) (22 digits) as one pre-scaler sum in the divisor cycle and a
// scaled dividend X' with X'/D' in [0.1, 1) in the dividend cycle (split
// into a random sum pair so that the carry-save adders really add), then
// steps through the 3D' cycle, nine iterations and the rounding cycle. The
// rounded quotient must equal X'/(10 D') rounded to 16 significant digits
// with ties to even (computed with integers), with the leading-zero flag set.
// A quotient that rounds to exactly 0.1 may be returned either as a rounding
// carry or, when the digits came out as 0.1000.. with a negative remainder,
// without a leading zero; both are accepted.
module tb_iteration_unit;
  import r100_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  mode_t mode = M_IDLE;
  logic [PW-1:0][3:0] s0 = '0, s1 = '0, s2 = '0, s3 = '0;
  logic [PW-1:0] c0 = '0, c1 = '0;
  logic [NDIG-1:0][3:0] q;
  logic lz, rc;
  int checks = 0, failures = 0;
  iteration_unit dut (.clk(clk), .rst_n(rst_n), .mode(mode), .ps_s0(s0), .ps_s1(s1),
                      .ps_s2(s2), .ps_s3(s3), .ps_c0(c0), .ps_c1(c1),
                      .q_bcd(q), .lz(lz), .rnd_carry(rc));
  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  function automatic logic [PW-1:0][3:0] bcd(input logic [127:0] n);
    logic [PW-1:0][3:0] r;
    for (int i = 0; i < PW; i++) begin r[i] = 4'(n % 10); n = n / 10; end
    return r;
  endfunction
  function automatic logic [127:0] rnd(input logic [127:0] lo, input logic [127:0] span);
    logic [127:0] r = 0;
    for (int i = 0; i < 4; i++) r = (r << 32) | 128'($urandom);
    return lo + r % span;
  endfunction
  initial begin
    logic [127:0] P21, P15, P16, dp, xp, num, qi, ri, part;
    bit up;
    P15 = 1; for (int i = 0; i < 15; i++) P15 = P15 * 10;
    P16 = P15 * 10; P21 = P16 * 100000;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 1500; t++) begin
      dp = rnd(P21, P21 / 99);
      xp = rnd(dp / 10 + 1, dp - dp / 10 - 1);
      if (t % 50 == 0) dp = P21;
      if (t % 50 == 1) xp = dp - 1;
      num = xp * P16;
      qi = num / dp; ri = num % dp;
      up = (2 * ri > dp) || (2 * ri == dp && qi[0]);
      qi = qi + 128'(up);
      // divisor cycle
      part = rnd(0, dp);
      mode = M_PS_X; s0 = bcd(part); s1 = bcd(dp - part);
      @(negedge clk);
      part = rnd(0, xp + 1);
      mode = M_ADD_X; s0 = bcd(part); s1 = bcd(xp - part);
      @(negedge clk);
      mode = M_MUL3; s0 = '0; s1 = '0;
      @(negedge clk);
      mode = M_ITER;
      repeat (ITERS) @(negedge clk);
      mode = M_ROUND;
      @(negedge clk);
      mode = M_IDLE;
      checks++;
      // a quotient just below 0.1 may be produced as 0.1000.. with a negative
      // remainder (no leading zero) or round up to 0.1 (rounding carry)
      if (!((lz && !rc && q == bcd(qi)[NDIG-1:0]) ||
            (qi == P16 && q == bcd(P15)[NDIG-1:0] && (lz == rc)))) begin
        failures++; $display("D'=%0d X'=%0d: q=%h expected %0d lz=%b", dp, xp, q, qi, lz);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
