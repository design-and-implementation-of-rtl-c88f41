// Testbench of the multiples and carry selection. For every sign and every
// pair of truncated digits h, l it checks the arithmetic meaning of the
// outputs rather than the table: the quotient pair 10*qh + ql1 must be the
// truncated estimate (10h + l, or 10h + l - 99 for a negative remainder, and
// 0 in the don't-care case), the selected multiples plus compensations must
// subtract exactly that many times D'
// (10*kh + kl1 + 100*comp_h + 10*comp_l = -(10*qh + ql1)), every multiple
// must be within -5..5 so that it exists in the multiples register, and the
// low-carry alternatives must be one step apart, or equal when wrap says the
// low carry is already included.
module tb_multiples_select;
  logic neg, dc, wrap;
  logic [9:0] h_oh, l_oh;
  logic signed [3:0] kh, kl1, kl2;
  logic signed [1:0] comp_h, comp_l;
  logic signed [4:0] qh, ql1, ql2;
  logic clk = 1'b0;
  int checks = 0, failures = 0;
  multiples_select dut (.neg(neg), .dc(dc), .wrap(wrap), .h_oh(h_oh), .l_oh(l_oh), .kh(kh), .kl1(kl1),
                        .kl2(kl2), .comp_h(comp_h), .comp_l(comp_l), .qh(qh), .ql1(ql1), .ql2(ql2));
  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    int est, q, added;
    bit bad;
    for (int wr = 0; wr < 2; wr++)
    for (int n = 0; n < 2; n++)
      for (int h = 0; h < 10; h++)
        for (int l = 0; l < 10; l++) begin
          neg = 1'(n); h_oh = 10'(1 << h); l_oh = 10'(1 << l);
          dc = neg && h == 9 && l == 9;
          wrap = 1'(wr);
          if (wrap && !(neg && h == 0 && l == 0)) continue;
          #1;
          est = dc ? 0 : (neg ? 10 * h + l - 99 : 10 * h + l);
          q = 10 * int'(qh) + int'(ql1);
          added = 10 * int'(kh) + int'(kl1) + 100 * int'(comp_h) + 10 * int'(comp_l);
          bad = (q != est) || (added != -q);
          bad |= (kh < -5 || kh > 5 || kl1 < -5 || kl1 > 5 || kl2 < -5 || kl2 > 5);
          bad |= (wrap && (kl2 != kl1 || ql2 != ql1));
          bad |= (!dc && !wrap && (int'(kl2) != int'(kl1) - 1 || int'(ql2) != int'(ql1) + 1));
          bad |= (qh < -9 || qh > 9 || ql1 < -9 || ql1 > 9);
          checks++;
          if (bad) begin
            failures++;
            $display("neg=%0d h=%0d l=%0d: qh=%0d ql1=%0d ql2=%0d kh=%0d kl1=%0d kl2=%0d ch=%0d cl=%0d",
                     n, h, l, qh, ql1, ql2, kh, kl1, kl2, comp_h, comp_l);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
