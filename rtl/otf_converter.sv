// On-the-fly conversion (Section 4.3.5 of the design). Each iteration
// delivers a signed radix-100 digit v = 10*qh + ql in [-99, 99]. Instead of
// shifting registers, the digit pair is written straight into its own place
// of an 18-digit quotient register: pair n (iteration n, counted from 0)
// occupies digits 17-2n and 16-2n, digit 17 being the most significant.
// A non-negative v is stored as it is. A negative v is stored as 100+v and
// one unit is borrowed from the digits already written: every stored digit
// whose lower stored digits are all zero changes, 0 to 9 and d to d-1; the
// rest keep their value. One zero flag per digit, kept in a register,
// provides "all lower digits zero" without a carry chain through the values.
// The partial quotient is never negative, so the borrow always finds a
// non-zero digit. Timing: clr empties the register; en writes one pair per
// clock edge.
module otf_converter
  import r100_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clr,
  input  logic                en,
  input  logic signed [4:0]   qh,        // -9..9
  input  logic signed [4:0]   ql,        // -9..10
  output logic [QDIG-1:0][3:0] q
);
  logic [QDIG-1:0]   zf;                 // digit is zero
  logic [3:0]        pair;               // next pair to write
  logic [QDIG-1:0][3:0] q_next;
  logic [QDIG-1:0]   zf_next;

  always_comb begin
    logic signed [7:0] v;
    logic [6:0]        u;
    logic              borrow;
    logic              lower_zero;
    int                hi;
    v      = 8'(qh) * 8'sd10 + 8'(ql);
    borrow = (v < 0);
    u      = borrow ? 7'(v + 8'sd100) : 7'(v);
    hi     = QDIG - 1 - 2 * int'(pair);
    q_next = q;
    // borrow: walk from the pair upwards; a digit changes while all digits
    // below it (down to the pair) are zero
    lower_zero = 1'b1;
    for (int j = 0; j < QDIG; j++) begin
      if (borrow && j > hi && lower_zero)
        q_next[j] = (q[j] == 4'd0) ? 4'd9 : q[j] - 4'd1;
      if (j > hi) lower_zero = lower_zero & zf[j];
    end
    for (int j = 0; j < QDIG; j++) begin
      if (j == hi)     q_next[j] = 4'(u / 7'd10);
      if (j == hi - 1) q_next[j] = 4'(u % 7'd10);
    end
    for (int j = 0; j < QDIG; j++) zf_next[j] = (q_next[j] == 4'd0);
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      q <= '0; zf <= '1; pair <= '0;
    end else if (clr) begin
      q <= '0; zf <= '1; pair <= '0;
    end else if (en) begin
      q <= q_next; zf <= zf_next; pair <= pair + 4'd1;
    end
endmodule
