// Decimal (BCD) digit carry-save adder, Section 4.1.3 of the design.
// For every digit i: (co[i+1], s[i]) = x[i] + y[i] + ci[i], with x, y BCD
// digits and ci a one-bit carry, so every digit works on its own and the delay
// does not grow with N. co[0] is always 0, which leaves a free slot for the
// '1' of a 10's complement in the next adder. The carry out of digit N-1 is
// dropped: all datapaths that use it work modulo 10^N.
// The digit function is written from its arithmetic definition (eq. 4.1).
module dcsa #(
  parameter int unsigned N = 23
) (
  input  logic [N-1:0][3:0] x,
  input  logic [N-1:0][3:0] y,
  input  logic [N-1:0]      ci,
  output logic [N-1:0][3:0] s,
  output logic [N-1:0]      co
);
  always_comb begin
    co = '0;
    for (int i = 0; i < N; i++) begin
      logic [4:0] t;
      t = {1'b0, x[i]} + {1'b0, y[i]} + {4'd0, ci[i]};
      if (t >= 5'd10) begin
        s[i] = 4'(t - 5'd10);
        if (i < N-1) co[(i < N-1) ? i+1 : 0] = 1'b1;
      end else begin
        s[i] = t[3:0];
      end
    end
  end
endmodule
