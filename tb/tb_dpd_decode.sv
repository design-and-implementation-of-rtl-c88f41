// Testbench of the decimal64 DPD decoder. All 1024 declet codes are decoded
// in every declet position and compared with a reference decoder written
// from the standard's declet table in a different form (field by field with
// digit arithmetic); random words check the sign, the exponent and leading
// digit taken from the combination field, and the infinity/NaN flag.
module tb_dpd_decode;
  import r100_pkg::*;
  logic [63:0] w;
  logic sign, special;
  logic [9:0] exp;
  logic [NDIG-1:0][3:0] coef;
  logic clk = 1'b0;
  int checks = 0, failures = 0;
  dpd_decode dut (.w(w), .sign(sign), .exp(exp), .coef(coef), .special(special));
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
  initial begin
    int msd, e;
    for (int b = 0; b < 1024; b++)
      for (int k = 0; k < 5; k++) begin
        w = {$urandom, $urandom};
        w[10*k +: 10] = 10'(b);
        #1;
        checks++;
        if (100 * int'(coef[3*k+2]) + 10 * int'(coef[3*k+1]) + int'(coef[3*k]) != ref_declet(10'(b))) begin
          failures++; $display("declet %b at %0d decoded to %h", 10'(b), k, coef[3*k +: 3]);
        end
      end
    for (int t = 0; t < 4000; t++) begin
      w = {$urandom, $urandom};
      #1;
      if (w[62:61] != 2'b11) begin e = {w[62:61], w[57:50]}; msd = w[60:58]; end
      else begin e = {w[60:59], w[57:50]}; msd = 8 + w[58]; end
      checks++;
      if (sign != w[63] || special != (w[62:59] == 4'b1111) ||
          (!special && (int'(exp) != e || int'(coef[NDIG-1]) != msd))) begin
        failures++; $display("word %h: sign %b exp %0d msd %0d", w, sign, exp, coef[NDIG-1]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
