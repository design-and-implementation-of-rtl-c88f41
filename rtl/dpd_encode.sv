// BCD-to-DPD encoder and decimal64 packer ("BCD to DPD" block of the
// divider's top level). Builds an IEEE 754-2008 decimal64 word from sign,
// 10-bit biased exponent and 16 BCD digits: the leading digit and the two
// exponent MSBs form the combination field, and each group of three digits is
// compressed into a 10-bit declet with the standard densely-packed-decimal
// rules (digits 8 and 9 are "large" and keep only their last bit).
// 'inf' forces the infinity encoding with the given sign.
// Purely combinational. The document names the block; the rules are the
// standard's.
module dpd_encode
  import r100_pkg::*;
(
  input  logic                 sign,
  input  logic [9:0]           exp,
  input  logic [NDIG-1:0][3:0] coef,
  input  logic                 inf,
  output logic [63:0]          w
);
  function automatic logic [9:0] declet(input logic [3:0] a, input logic [3:0] b,
                                        input logic [3:0] c);
    unique case ({a[3], b[3], c[3]})
      3'b000: declet = {a[2:0], b[2:0], 1'b0, c[2:0]};
      3'b001: declet = {a[2:0], b[2:0], 3'b100, c[0]};
      3'b010: declet = {a[2:0], c[2:1], b[0], 3'b101, c[0]};
      3'b100: declet = {c[2:1], a[0], b[2:0], 3'b110, c[0]};
      3'b110: declet = {c[2:1], a[0], 2'b00, b[0], 3'b111, c[0]};
      3'b101: declet = {b[2:1], a[0], 2'b01, b[0], 3'b111, c[0]};
      3'b011: declet = {a[2:0], 2'b10, b[0], 3'b111, c[0]};
      default: declet = {2'b00, a[0], 2'b11, b[0], 3'b111, c[0]};
    endcase
  endfunction

  always_comb begin
    w[63] = sign;
    if (inf) begin
      w[62:0] = {5'b11110, 58'd0};
    end else begin
      if (!coef[NDIG-1][3]) w[62:58] = {exp[9:8], coef[NDIG-1][2:0]};
      else                  w[62:58] = {2'b11, exp[9:8], coef[NDIG-1][0]};
      w[57:50] = exp[7:0];
      for (int k = 0; k < 5; k++)
        w[10*k +: 10] = declet(coef[3*k+2], coef[3*k+1], coef[3*k]);
    end
  end
endmodule
