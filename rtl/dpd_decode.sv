// Decimal64 unpacker and DPD-to-BCD decoder ("DPD to BCD" block of the
// divider's top level). Splits an IEEE 754-2008 decimal64 word into sign,
// 10-bit biased exponent and 16 BCD coefficient digits. The combination field
// gives the two exponent MSBs and the leading digit; each of the five 10-bit
// declets of the trailing field is expanded into three BCD digits with the
// standard densely-packed-decimal rules. Purely combinational.
// The document names the block and the format; the decoding rules are the
// ones of the standard. Infinity and NaN encodings are flagged on 'special'
// but otherwise decoded as if finite (the divider does not treat them).
module dpd_decode
  import r100_pkg::*;
(
  input  logic [63:0]          w,
  output logic                 sign,
  output logic [9:0]           exp,
  output logic [NDIG-1:0][3:0] coef,
  output logic                 special
);
  function automatic logic [11:0] declet(input logic [9:0] b);
    logic p, q, r, s, t, u, v, wb, x, y;
    {p, q, r, s, t, u, v, wb, x, y} = b;
    if (!v)                          declet = {1'b0, p, q, r, 1'b0, s, t, u, 1'b0, wb, x, y};
    else unique case ({wb, x})
      2'b00: declet = {1'b0, p, q, r, 1'b0, s, t, u, 3'b100, y};
      2'b01: declet = {1'b0, p, q, r, 3'b100, u, 1'b0, s, t, y};
      2'b10: declet = {3'b100, r, 1'b0, s, t, u, 1'b0, p, q, y};
      default: unique case ({s, t})
        2'b00: declet = {3'b100, r, 3'b100, u, 1'b0, p, q, y};
        2'b01: declet = {3'b100, r, 1'b0, p, q, u, 3'b100, y};
        2'b10: declet = {1'b0, p, q, r, 3'b100, u, 3'b100, y};
        default: declet = {3'b100, r, 3'b100, u, 3'b100, y};
      endcase
    endcase
  endfunction

  logic [4:0] g;
  assign sign = w[63];
  assign g    = w[62:58];

  always_comb begin
    special = (g[4:1] == 4'b1111);
    if (g[4:3] != 2'b11) begin
      exp     = {g[4:3], w[57:50]};
      coef[NDIG-1] = {1'b0, g[2:0]};
    end else begin
      exp     = {g[2:1], w[57:50]};
      coef[NDIG-1] = {3'b100, g[0]};
    end
    for (int k = 0; k < 5; k++)
      coef[3*k +: 3] = declet(w[10*k +: 10]);
  end
endmodule
