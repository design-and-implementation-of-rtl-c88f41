// BCD quintupler: y = 5*a for an N-digit BCD vector, without carry propagation.
// 5*a = 10*(a/2): digit i of the result is 5*(a[i] mod 2) + floor(a[i-1]/2),
// never above 9, which is the rule Table 4.2 of the design tabulates bit by bit.
// The half of the lowest digit that falls below digit 0 is dropped and the
// top digit's half is lost; callers keep a zero digit at both ends.
// Combinational (Section 4.1.2).
module bcd_quintupler #(
  parameter int unsigned N = 20
) (
  input  logic [N-1:0][3:0] a,
  output logic [N-1:0][3:0] y
);
  always_comb begin
    for (int i = 0; i < N; i++) begin
      logic [3:0] lowhalf;
      lowhalf = (i > 0) ? {1'b0, a[(i > 0) ? i-1 : 0][3:1]} : 4'd0;
      y[i]    = (a[i][0] ? 4'd5 : 4'd0) + lowhalf;
    end
  end
endmodule
