// Testbench of the on-the-fly quotient converter. Nine signed radix-100
// quotient digit pairs (qh in -9..9, ql in -9..10) are fed, one per clock
// with en high, after a clr cycle. The first pair is positive, as in the
// divider, so every prefix is non-negative. After the ninth pair the 18 BCD
// digits must equal sum(10*qh + ql) * 100^(9-n) computed by the testbench.
// The converter must update in exactly one cycle per pair and hold its value
// while en is low. Pairs with negative digits (which make the converter
// borrow from the stored prefix) are counted and must occur.
module tb_otf_converter;
  import r100_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, en = 1'b0;
  logic signed [4:0] qh = '0, ql = '0;
  logic [QDIG-1:0][3:0] q;
  int checks = 0, failures = 0, borrows = 0;
  otf_converter dut (.clk(clk), .rst_n(rst_n), .clr(clr), .en(en), .qh(qh), .ql(ql), .q(q));
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
  initial begin
    logic signed [127:0] acc;
    int h, l;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk); clr = 1'b1;
      @(negedge clk); clr = 1'b0;
      acc = 0;
      for (int n = 0; n < ITERS; n++) begin
        h = $urandom_range(18) - 9; l = $urandom_range(19) - 9;
        if (n == 0) begin h = $urandom_range(9); l = $urandom_range(9) + 1; end
        if (t % 5 == 0 && n > 0) begin h = -9; l = -9; end
        if (h < 0 || l < 0) borrows++;
        qh = 5'(h); ql = 5'(l); en = 1'b1;
        acc = acc * 100 + 10 * h + l;
        @(negedge clk);
        en = 1'b0;
        if ($urandom_range(1) == 1) @(negedge clk);    // idle cycle: must hold
      end
      checks++;
      if (acc < 0 || val(q) != 128'(acc)) begin
        failures++; $display("otf: got %h expected %0d", q, acc);
      end
    end
    checks++;
    if (borrows == 0) begin failures++; $display("no borrow"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
