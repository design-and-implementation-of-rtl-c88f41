// Decimal carry-propagate adder: s = a + b for two N-digit vectors whose
// digits are 0..9 (a BCD sum and a digit-wise carry vector both qualify).
// cy[i] is the carry out of digit i, so cy[k-1] is the carry that the digits
// below k send into digit k; the iteration module uses it as the "carry"
// into the quotient digits. The carry out of the top digit is dropped
// (modulo 10^N). Ripple structure; the design gives only the function.
module dcpa #(
  parameter int unsigned N = 23
) (
  input  logic [N-1:0][3:0] a,
  input  logic [N-1:0][3:0] b,
  output logic [N-1:0][3:0] s,
  output logic [N-1:0]      cy
);
  always_comb begin
    logic c;
    c = 1'b0;
    for (int i = 0; i < N; i++) begin
      logic [4:0] t;
      t = {1'b0, a[i]} + {1'b0, b[i]} + {4'd0, c};
      if (t >= 5'd10) begin
        s[i] = 4'(t - 5'd10);
        c    = 1'b1;
      end else begin
        s[i] = t[3:0];
        c    = 1'b0;
      end
      cy[i] = c;
    end
  end
endmodule
