// Digit recognition and shifter of the iteration module (Section 4.3.1,
// Table 4.3 of the design). The partial remainder is kept as a BCD sum digit
// plus a 2-bit carry per digit. For the sign digit and the two quotient
// digits this block forms one-hot codes of s+c (values 0..9 plus a bit for
// "10 or more"), lets the carry of the low quotient digit advance the high
// one (shifter), and predicts the sign: the sign digit, before carries from
// below, can only be 8, 9 or 0. It is plus for 0, or for 9 when the high
// quotient digit carries; minus otherwise. When the sign digit and both
// quotient digits read 9 a carry from the lower digits may still flip the
// sign; that case is flagged (dc) and the quotient pair is taken as 0.
// Carries from the digits below the quotient digits are not seen here; the
// multiples selection prepares both cases.
// One case lies outside the sign table: a remainder of exactly -1 (reached
// when -0.01 is multiplied by 100 after a dc step) may read 8.99 and needs
// the carry from below to become 9.00. The sign digit then resolves to 8;
// this design flags it (wrap) and presents it as 9.00 with the low carry
// already consumed, so the pair -99 is selected. Combinational.
module digit_recognition (
  input  logic [2:0][3:0] s_top,  // sum digits: [2] sign, [1] qH, [0] qL
  input  logic [2:0][1:0] c_top,  // 2-bit carries of the same digits
  output logic            neg,    // predicted sign: 1 = minus
  output logic            dc,     // sign 9, qH 9, qL 9: quotient pair forced to 0
  output logic [9:0]      h_oh,   // qH digit one-hot, after the qL carry
  output logic [9:0]      l_oh,   // qL digit one-hot
  output logic            wrap    // remainder reads 8.99: taken as 9.00
);
  logic [10:0] oh [3];
  logic        carry_l, carry_h;
  logic [9:0]  h_raw;

  always_comb begin
    for (int k = 0; k < 3; k++) begin
      logic [3:0] t;
      t = s_top[k] + {2'b00, c_top[k]};
      oh[k] = '0;
      if (t >= 4'd10) begin
        oh[k][10]       = 1'b1;
        oh[k][t - 4'd10] = 1'b1;
      end else begin
        oh[k][t] = 1'b1;
      end
    end
    l_oh    = oh[0][9:0];
    carry_l = oh[0][10];
    h_raw   = oh[1][9:0];
    // shifter: a carry from qL rotates the qH code by one place
    h_oh    = carry_l ? {h_raw[8:0], h_raw[9]} : h_raw;
    carry_h = oh[1][10] | (carry_l & h_raw[9]);
    // sign prediction (Table 4.3); the sign digit code oh[2] is mod 10
    neg = !(oh[2][0] || (oh[2][9] && carry_h));
    dc  = oh[2][9] && !carry_h && h_oh[9] && l_oh[9];
    // resolved sign digit 8 (only 8.99 is possible for a bounded remainder)
    wrap = (oh[2][8] && !carry_h) || (oh[2][7] && carry_h);
    if (wrap) begin
      neg  = 1'b1;
      h_oh = 10'd1;
      l_oh = 10'd1;
    end
  end
endmodule
