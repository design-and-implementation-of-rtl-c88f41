// Divide-by-zero detector: flags a divisor coefficient whose 16 BCD digits
// are all zero, which makes the result an infinity of the quotient's sign.
// Combinational OR-reduction over all coefficient bits. The document names
// the block and the exception; the top level also uses the same test on the
// dividend to return a zero result.
module div_zero_detect
  import r100_pkg::*;
(
  input  logic [NDIG-1:0][3:0] d,
  output logic                 dz
);
  assign dz = ~|d;
endmodule
