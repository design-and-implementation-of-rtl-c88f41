// Testbench of the exponent and sign unit: random biased exponents, shift
// counts and adjustments; the result must be ex - ed + 398 + adj + lzd - lzx
// clamped to 0..767 with the range flag set exactly when clamping happened,
// and the sign the XOR of the operand signs. Both clamping directions are
// required to occur.
module tb_exponent_calc;
  logic [9:0] ex, ed, eq;
  logic [4:0] lzx, lzd;
  logic signed [5:0] adj;
  logic sx, sd, sq, rerr;
  logic clk = 1'b0;
  int checks = 0, failures = 0, n_lo = 0, n_hi = 0;
  exponent_calc dut (.ex(ex), .ed(ed), .lzx(lzx), .lzd(lzd), .adj(adj), .sx(sx), .sd(sd),
                     .eq(eq), .sq(sq), .range_err(rerr));
  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    int e, ee;
    for (int t = 0; t < 5000; t++) begin
      ex = 10'($urandom_range(767)); ed = 10'($urandom_range(767));
      lzx = 5'($urandom_range(15)); lzd = 5'($urandom_range(15));
      adj = 6'(int'($urandom_range(3)) - 16);
      sx = 1'($urandom); sd = 1'($urandom);
      #1;
      e = int'(ex) - int'(ed) + 398 + int'(adj) + int'(lzd) - int'(lzx);
      ee = (e < 0) ? 0 : (e > 767) ? 767 : e;
      if (e < 0) n_lo++;
      if (e > 767) n_hi++;
      checks++;
      if (int'(eq) != ee || rerr != (e != ee) || sq != (sx ^ sd)) begin
        failures++; $display("ex=%0d ed=%0d lzx=%0d lzd=%0d adj=%0d -> %0d", ex, ed, lzx, lzd, adj, eq);
      end
    end
    checks += 2;
    if (n_lo == 0) begin failures++; $display("no underflow case"); end
    if (n_hi == 0) begin failures++; $display("no overflow case"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
