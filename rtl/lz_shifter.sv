// Leading-zero counter and normalizing shifter (the two "Shifter" blocks in
// front of the divider). Counts the leading zero digits of a 16-digit BCD
// coefficient and shifts it left by that many digits so that its first digit
// is non-zero; lz = 16 and y = 0 for a zero coefficient. The count adjusts
// the exponent. Purely combinational: a priority count followed by a
// digit-granular barrel shifter (log2 stages). The document gives the block's
// purpose; its structure is this design's choice.
module lz_shifter
  import r100_pkg::*;
(
  input  logic [NDIG-1:0][3:0] a,
  output logic [NDIG-1:0][3:0] y,
  output logic [4:0]           lz
);
  logic [NDIG*4-1:0] st [5];
  always_comb begin
    lz = 5'(NDIG);
    for (int i = 0; i < NDIG; i++)
      if (a[i] != 4'd0) lz = 5'(NDIG - 1 - i);
    st[0] = a;
    for (int k = 0; k < 4; k++)
      st[k+1] = lz[k] ? (st[k] << (4 * (1 << k))) : st[k];
    // lz[4] is set only for a zero input: result zero either way
    y = lz[4] ? '0 : st[4];
  end
endmodule
