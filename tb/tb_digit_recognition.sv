// Testbench of the digit recognition: every combination of the three top
// sum digits with random 2-bit carries is applied. The testbench adds the
// carries arithmetically (T = sum + carries of the three digits, modulo
// 1000) and expects: l_oh = one-hot of T mod 10, h_oh = one-hot of the tens
// digit, neg set when the resolved sign digit is 9, dc set exactly for
// T = 999. Combinations whose resolved sign digit is neither 0 nor 9 cannot
// occur for a bounded remainder and are skipped, except T = 899 (a remainder
// of exactly -1 read without its low carry), which must raise wrap and read
// as sign 9 with both digits 0.
module tb_digit_recognition;
  logic [2:0][3:0] s;
  logic [2:0][1:0] c;
  logic neg, dc, wrap;
  logic [9:0] h_oh, l_oh;
  logic clk = 1'b0;
  int checks = 0, failures = 0;
  digit_recognition dut (.s_top(s), .c_top(c), .neg(neg), .dc(dc), .h_oh(h_oh), .l_oh(l_oh), .wrap(wrap));
  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    int t;
    for (int v = 0; v < 1000; v++)
      for (int r = 0; r < 8; r++) begin
        s = {4'(v / 100), 4'((v / 10) % 10), 4'(v % 10)};
        for (int k = 0; k < 3; k++) c[k] = 2'($urandom_range(2));
        if (r == 0) c = '0;
        #1;
        t = 0;
        for (int k = 2; k >= 0; k--) t = t * 10 + int'(s[k]) + int'(c[k]);
        t = t % 1000;
        if (t / 100 != 0 && t / 100 != 9 && t != 899) continue;   // not a valid remainder
        checks++;
        if (t == 899) begin   // exactly -1 read without its low carry
          if (!wrap || !neg || dc || h_oh != 10'd1 || l_oh != 10'd1) begin
            failures++; $display("s=%h c=%h: 8.99 case wrong", s, c);
          end
        end else if (wrap || l_oh != 10'(1 << (t % 10)) || h_oh != 10'(1 << ((t / 10) % 10)) ||
            neg != (t / 100 == 9) || dc != (t == 999)) begin
          failures++;
          $display("s=%h c=%h: neg=%b dc=%b h=%b l=%b (T=%0d)", s, c, neg, dc, h_oh, l_oh, t);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
