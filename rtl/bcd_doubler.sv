// BCD doubler: y = 2*a for an N-digit BCD vector, without carry propagation.
// 2*d is even, so the carry (d >= 5) of the digit below only fills the LSB:
// y[i] = (2*a[i] mod 10) | (a[i-1] >= 5). The carry out of the top digit is
// dropped; callers leave a zero digit on top. Combinational (Section 4.1.2).
module bcd_doubler #(
  parameter int unsigned N = 20
) (
  input  logic [N-1:0][3:0] a,
  output logic [N-1:0][3:0] y
);
  always_comb begin
    for (int i = 0; i < N; i++) begin
      logic [4:0] twice;
      logic       cin;
      twice = {a[i], 1'b0};
      if (twice >= 5'd10) twice = twice - 5'd10;
      cin   = (i > 0) ? (a[(i > 0) ? i-1 : 0] >= 4'd5) : 1'b0;
      y[i]  = {twice[3:1], cin};
    end
  end
endmodule
