// Testbench of the decimal64 DPD encoder. Random and directed coefficients
// (every three-digit group value 000..999 in every group position, and
// leading digits 0..9) with random sign and exponent are encoded; the word is
// decoded by the testbench's own reference decoder and must give back the
// same sign, exponent and digits, and each declet must be the canonical one
// (the smallest code decoding to its value). The infinity input must yield
// the infinity encoding.
module tb_dpd_encode;
  import r100_pkg::*;
  logic sign, inf;
  logic [9:0] exp;
  logic [NDIG-1:0][3:0] coef;
  logic [63:0] w;
  logic clk = 1'b0;
  int checks = 0, failures = 0;
  dpd_encode dut (.sign(sign), .exp(exp), .coef(coef), .inf(inf), .w(w));
  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  function automatic int ref_declet(input logic [9:0] b);
    int d2, d1, d0;
    if (!b[3]) begin d2 = b[9:7]; d1 = b[6:4]; d0 = b[2:0]; end
    else case (b[2:1])
      2'b00: begin d2 = b[9:7]; d1 = b[6:4]; d0 = 8 + b[0]; end
      2'b01: begin d2 = b[9:7]; d1 = 8 + b[4]; d0 = 2 * b[6:5] + b[0]; end
      2'b10: begin d2 = 8 + b[7]; d1 = b[6:4]; d0 = 2 * b[9:8] + b[0]; end
      default: case (b[6:5])
        2'b00: begin d2 = 8 + b[7]; d1 = 8 + b[4]; d0 = 2 * b[9:8] + b[0]; end
        2'b01: begin d2 = 8 + b[7]; d1 = 2 * b[9:8] + b[4]; d0 = 8 + b[0]; end
        2'b10: begin d2 = b[9:7]; d1 = 8 + b[4]; d0 = 8 + b[0]; end
        default: begin d2 = 8 + b[7]; d1 = 8 + b[4]; d0 = 8 + b[0]; end
      endcase
    endcase
    return 100 * d2 + 10 * d1 + d0;
  endfunction
  int canon [1000];
  initial begin
    int msd, e, g;
    bit bad;
    for (int b = 1023; b >= 0; b--) canon[ref_declet(10'(b))] = b;
    inf = 1'b0;
    for (int t = 0; t < 6000; t++) begin
      sign = 1'($urandom); exp = 10'($urandom_range(767));
      for (int i = 0; i < NDIG; i++) coef[i] = 4'($urandom_range(9));
      if (t < 5000) begin
        g = t % 1000;
        coef[3*((t/1000)%5) +: 3] = {4'(g / 100), 4'((g / 10) % 10), 4'(g % 10)};
      end
      #1;
      if (w[62:61] != 2'b11) begin e = {w[62:61], w[57:50]}; msd = w[60:58]; end
      else begin e = {w[60:59], w[57:50]}; msd = 8 + w[58]; end
      bad = (w[63] != sign) || (e != int'(exp)) || (msd != int'(coef[NDIG-1]));
      for (int k = 0; k < 5; k++) begin
        g = 100 * int'(coef[3*k+2]) + 10 * int'(coef[3*k+1]) + int'(coef[3*k]);
        if (int'(w[10*k +: 10]) != canon[g]) bad = 1;
      end
      checks++;
      if (bad) begin failures++; $display("encode %h e%0d -> %h", coef, exp, w); end
    end
    inf = 1'b1; sign = 1'b1;
    #1;
    checks++;
    if (w[63:58] != 6'b111110) begin failures++; $display("infinity wrong: %h", w); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
