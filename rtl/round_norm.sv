// Rounding & normalization (Section 4.3.6, Table 4.7 of the design).
// Input: the 18-digit quotient 0.q1..q18 (q[17] = q1) and the sign / zero
// state of the final partial remainder. A leading zero is shifted out, which
// leaves 16 kept digits, a round digit and the rest:
//  * leading zero: kept q2..q17, round digit q18, rest = final remainder;
//  * otherwise:    kept q1..q16, round digit q17, rest = q18 with the final
//    remainder; since |R| < D', the rest is positive when q18 is not 0.
// roundTiesToEven: round digit 0..4 -> Q; 6..9 -> QP; 5 -> Q for a negative
// rest, QP for a positive rest, and the even one of Q, QP for a zero rest.
// QP = Q+1 is formed by marking the run of trailing 9s: those digits become 0
// and the digit above the run is raised by one. When all 16 digits are 9 the
// result is 1000000000000000 and 'carry' asks for one more in the exponent.
// Combinational.
module round_norm
  import r100_pkg::*;
(
  input  logic [QDIG-1:0][3:0] q,
  input  logic                 r_neg,
  input  logic                 r_zero,
  output logic [NDIG-1:0][3:0] c,
  output logic                 lz,
  output logic                 carry
);
  always_comb begin
    logic [NDIG-1:0][3:0] kept, qp;
    logic [3:0]           rd;
    logic                 rest_neg, rest_zero, up, run9;
    lz = (q[QDIG-1] == 4'd0);
    if (lz) begin
      kept      = q[QDIG-2:1];
      rd        = q[0];
      rest_neg  = r_neg;
      rest_zero = r_zero;
    end else begin
      kept      = q[QDIG-1:2];
      rd        = q[1];
      rest_neg  = (q[0] == 4'd0) && r_neg;
      rest_zero = (q[0] == 4'd0) && r_zero;
    end
    if (rd < 4'd5)       up = 1'b0;
    else if (rd > 4'd5)  up = 1'b1;
    else if (rest_neg)   up = 1'b0;
    else if (!rest_zero) up = 1'b1;
    else                 up = kept[0][0];     // tie: make the last digit even
    // QP: trailing 9s become 0, the digit above them is raised
    run9 = 1'b1;
    for (int i = 0; i < NDIG; i++) begin
      if (run9) qp[i] = (kept[i] == 4'd9) ? 4'd0 : kept[i] + 4'd1;
      else      qp[i] = kept[i];
      run9 = run9 & (kept[i] == 4'd9);
    end
    carry = up & run9;
    if (!up)        c = kept;
    else if (carry) c = {4'd1, {(NDIG-1){4'd0}}};
    else            c = qp;
  end
endmodule
