// Carry transformation of the iteration module (Section 4.3.3 of the
// design): after two DCSA levels two 1-bit carry vectors remain; instead of a
// third adder level they are added digit by digit into one 2-bit carry
// (0..2), which with the BCD sum forms the next partial remainder.
// Combinational.
module carry_combine #(
  parameter int unsigned W = 23
) (
  input  logic [W-1:0]      ca,
  input  logic [W-1:0]      cb,
  output logic [W-1:0][1:0] c2
);
  always_comb
    for (int i = 0; i < W; i++) c2[i] = {1'b0, ca[i]} + {1'b0, cb[i]};
endmodule
