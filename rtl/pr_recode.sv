// "Logic block" of the iteration module (Section 4.3.3 of the design): recodes
// the partial remainder from a BCD sum digit plus a 2-bit carry (0..2) per
// digit to a BCD sum digit plus a 1-bit carry, without carry propagation:
// t = s + c (0..11); the new digit is t mod 10 and t >= 10 becomes the carry
// into the next digit. c1[0] is 0 and the carry out of the top digit is
// dropped (the remainder is kept modulo 10). Combinational.
module pr_recode #(
  parameter int unsigned W = 23
) (
  input  logic [W-1:0][3:0] s,
  input  logic [W-1:0][1:0] c,
  output logic [W-1:0][3:0] s1,
  output logic [W-1:0]      c1
);
  always_comb begin
    c1 = '0;
    for (int i = 0; i < W; i++) begin
      logic [3:0] t;
      t = s[i] + {2'b00, c[i]};
      if (t >= 4'd10) begin
        s1[i] = t - 4'd10;
        if (i < W-1) c1[(i < W-1) ? i+1 : 0] = 1'b1;
      end else begin
        s1[i] = t;
      end
    end
  end
endmodule
