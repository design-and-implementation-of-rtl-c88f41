// Exponent and sign unit of the decimal64 divider. The sign of the quotient
// is the XOR of the operand signs. The biased quotient exponent is
//   eq = ex - ed + BIAS + adj + lzd - lzx
// where ex, ed are the biased operand exponents, lzx, lzd the leading zeros
// removed from the coefficients before division, and adj the divider's
// exponent adjustment (it accounts for the fraction alignment of the
// coefficients, the dividend shift and the rounding carry). The result is
// clamped to [0, EMAX]; 'range_err' marks a clamped value (overflow or
// underflow handling beyond this flag is not done). Combinational.
// The document names the block and the decimal64 bias; the formula layout and
// the clamp are this design's.
module exponent_calc
  import r100_pkg::*;
#(
  parameter int BIAS = 398,
  parameter int EMAX = 767
) (
  input  logic [9:0]        ex,
  input  logic [9:0]        ed,
  input  logic [4:0]        lzx,
  input  logic [4:0]        lzd,
  input  logic signed [5:0] adj,
  input  logic              sx,
  input  logic              sd,
  output logic [9:0]        eq,
  output logic              sq,
  output logic              range_err
);
  logic signed [12:0] e;
  always_comb begin
    e = 13'(signed'({3'b0, ex})) - 13'(signed'({3'b0, ed})) + 13'(BIAS) + 13'(adj)
        + 13'(signed'({8'b0, lzd})) - 13'(signed'({8'b0, lzx}));
    range_err = (e < 0) || (e > 13'(EMAX));
    if (e < 0)                eq = '0;
    else if (e > 13'(EMAX))   eq = 10'(EMAX);
    else                      eq = e[9:0];
  end
  assign sq = sx ^ sd;
endmodule
