// "Negative" block: digit-wise 9's complement of an N-digit BCD vector
// (Table 4.1 of the design: digit d -> 9-d). No carries between digits; the
// 10's complement is obtained by adding a '1' elsewhere (a free carry slot of a
// carry-save adder). Purely combinational.
module bcd_nines_comp #(
  parameter int unsigned N = 23
) (
  input  logic [N-1:0][3:0] a,
  output logic [N-1:0][3:0] y
);
  always_comb
    for (int i = 0; i < N; i++) y[i] = 4'd9 - a[i];
endmodule
