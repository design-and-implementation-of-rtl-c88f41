// Testbench of the pre-scaling module, driven with the controller's timing:
// load the divisor, one cycle later capture its terms while loading the
// aligned dividend, one cycle later capture the dividend terms. The six
// output vectors (four sums, two carry vectors, with negative terms in 10's
// complement) must add up, modulo 10^PW, to the operand times the parameter
// P reported on pa/exc, times the multiplier 1, 2 or 5 chosen from the
// divisor MSD, recomputed by the testbench. In addition the scaled divisor
// D_m*P must lie in [1, 1 + 1/99). Divisors with the exceptional prefixes
// are included and counted.
module tb_prescaler;
  import r100_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0, sel = 1'b0, cap = 1'b0;
  logic [NDIG-1:0][3:0] dv = '0;
  logic [NDIG:0][3:0]   xv = '0;
  logic [PW-1:0][3:0] s0, s1, s2, s3;
  logic [PW-1:0] c0, c1;
  logic [8:0] pa;
  logic [1:0] exc;
  int checks = 0, failures = 0, n_exc = 0;
  prescaler dut (.clk(clk), .rst_n(rst_n), .load(load), .sel_dividend(sel), .divisor(dv),
                 .dividend(xv), .capture(cap), .s0(s0), .s1(s1), .s2(s2), .s3(s3),
                 .c0(c0), .c1(c1), .pa(pa), .exc(exc));
  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic [127:0] M;
  function automatic logic [127:0] total();
    logic [127:0] r = 0;
    for (int i = PW - 1; i >= 0; i--)
      r = r * 10 + 128'(s0[i]) + 128'(s1[i]) + 128'(s2[i]) + 128'(s3[i]) + 128'(c0[i]) + 128'(c1[i]);
    return r % M;
  endfunction
  function automatic logic [127:0] pval();
    return 128'(1000 * (pa[8] ? 2 : 1) + int'(pa[7:4]) * (exc[1] ? 10 : 100) + int'(pa[3:0]) * (exc[0] ? 1 : 10));
  endfunction
  initial begin
    logic [127:0] di, xi, m, P, P19;
    M = 1; for (int i = 0; i < PW; i++) M = M * 10;
    P19 = 1; for (int i = 0; i < 19; i++) P19 = P19 * 10;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 3000; t++) begin
      for (int i = 0; i < NDIG; i++) dv[i] = 4'($urandom_range(9));
      dv[NDIG-1] = 4'($urandom_range(9, 1));
      case (t % 10)
        0: dv[NDIG-1 -: 3] = {4'd9, 4'd0, 4'd9};
        1: dv[NDIG-1 -: 3] = {4'd9, 4'd4, 4'd3};
        2: dv[NDIG-1 -: 3] = {4'd1, 4'd9, 4'd0};   // 5 x 0.190 = 0.950..0.955
        3: dv[NDIG-1 -: 3] = {4'd4, 4'd9, 4'd0};   // 2 x 0.490 = 0.980
        default: ;
      endcase
      for (int i = 0; i <= NDIG; i++) xv[i] = 4'($urandom_range(9));
      di = 0; for (int i = NDIG - 1; i >= 0; i--) di = di * 10 + 128'(dv[i]);
      xi = 0; for (int i = NDIG; i >= 0; i--) xi = xi * 10 + 128'(xv[i]);
      m = (dv[NDIG-1] == 1) ? 5 : (dv[NDIG-1] < 5) ? 2 : 1;
      load = 1'b1; sel = 1'b0;
      @(negedge clk);
      cap = 1'b1; sel = 1'b1;             // capture divisor terms, load dividend
      @(negedge clk);
      load = 1'b0; sel = 1'b0;            // capture dividend terms next
      P = pval();
      if (exc != 0) n_exc++;
      checks += 2;
      // divisor: 10^-16 * 10^-3 units -> 10^-21 frame: x100
      if (total() != (di * m * P * 100) % M) begin
        failures++; $display("divisor terms wrong: d=%h P=%0d", dv, P);
      end
      if (di * m * P < P19 || 99 * di * m * P >= 100 * P19) begin
        failures++; $display("D' out of range: d=%h P=%0d", dv, P);
      end
      @(negedge clk);
      cap = 1'b0;
      checks++;
      // dividend: 10^-17 * 10^-3 units -> x10
      if (total() != (xi * m * P * 10) % M || pval() != P) begin
        failures++; $display("dividend terms wrong: x=%h P=%0d", xv, P);
      end
    end
    checks++;
    if (n_exc == 0) begin failures++; $display("no exceptional parameter"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
