// Iteration module (Section 4.3, Figure 4.2 of the design).
// Holds the partial remainder R as a BCD sum and a 2-bit carry per digit in
// a W-digit frame (digit W-1 = sign digit of weight 10^0, 0 or 9), the
// multiples 1..5 D' and +-110D' in carry-save form. Negative multiples are
// formed from the positive ones by the Negative blocks when selected.
// One iteration (mode M_ITER) computes R' = 100 R - q D' with q = 10 qH + qL
// read off by truncation:
//  * digit recognition + shifter give the sign and the two quotient digits
//    from the top three digits; the DCPA adds sum and carry in parallel and
//    supplies the carry from the lower digits into qL, which picks one of the
//    two qL multiples (carry selection MUX);
//  * multiples selection and the compensation table give qH*10D', qL*D'
//    (negative ones as 9's complement, their '1's in free carry slot 0) and
//    the compensation in carry-save form;
//  * the logic block recodes R to a 1-bit carry; R is shifted two digits;
//  * DCSA a adds R sum, qL D' and R carry, DCSA b adds qH D' and the
//    compensation, DCSA c adds the two sums and the carry of a; the carry
//    transformation merges the carries of b and c into the new 2-bit carry.
//  * the on-the-fly converter stores the quotient digits.
// Reuse (Section 4.3.4): the same three DCSAs add the pre-scaling outputs of
// the divisor (M_PS_X, giving D' in carry-save) and of the dividend (M_ADD_X,
// giving R0 = X'/10), and compute +-110D' (M_MUL3). The single DCPA makes D'
// compact (M_ADD_X, followed by the doubler and quintupler for
// 2D', 4D', 5D'), forms 3D' = D' + 2D' (M_MUL3), provides the low
// carry (M_ITER) and the compact final remainder for rounding (M_ROUND).
// All registers change on the rising edge at the end of the cycle of a mode.
// Lint notes: the two top carry bits of the recoded remainder are unused on
// purpose, since R is multiplied by 100 and anything above the sign digit is
// discarded (10's complement arithmetic modulo 10). The assertion on the
// sign digit uses rst_n as its disable condition, which lint reports as a
// reset used both synchronously and asynchronously; it is simulation-only.
module iteration_unit
  import r100_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  mode_t                 mode,
  input  logic [PW-1:0][3:0]    ps_s0, ps_s1, ps_s2, ps_s3,   // reuse inputs
  input  logic [PW-1:0]         ps_c0, ps_c1,
  output logic [NDIG-1:0][3:0]  q_bcd,      // rounded quotient (after M_ROUND)
  output logic                  lz,         // quotient had a leading zero
  output logic                  rnd_carry   // rounding carried out of 16 digits
);
  // ---------------- registers
  logic [W-1:0][3:0] pr_s;                 // partial remainder sum
  logic [W-1:0][1:0] pr_c;                 // partial remainder 2-bit carry
  logic [W-1:0][3:0] m1, m2, m3, m4, m5;
  logic [W-1:0][3:0] p110_s, n110_s;
  logic [W-1:0]      p110_c, n110_c;

  // ---------------- DCPA (shared)
  logic [W-1:0][3:0] cpa_a, cpa_b, cpa_s;
  logic [W-1:0]      cpa_cy;
  always_comb begin
    if (mode == M_MUL3) begin
      cpa_a = m1;
      cpa_b = m2;
    end else begin
      cpa_a = pr_s;
      for (int i = 0; i < W; i++) cpa_b[i] = {2'b00, pr_c[i]};
    end
  end
  dcpa #(.N(W)) u_cpa (.a(cpa_a), .b(cpa_b), .s(cpa_s), .cy(cpa_cy));

  logic [W-1:0][3:0] d2, d4, d5;
  bcd_doubler    #(.N(W)) u_dbl1 (.a(cpa_s), .y(d2));
  bcd_doubler    #(.N(W)) u_dbl2 (.a(d2),    .y(d4));
  bcd_quintupler #(.N(W)) u_quin (.a(cpa_s), .y(d5));

  // ---------------- quotient selection
  logic              neg, dc, wrap;
  logic [9:0]        h_oh, l_oh;
  logic signed [3:0] kh, kl1, kl2, kl;
  logic signed [1:0] comp_h, comp_l;
  logic signed [4:0] qh, ql1, ql2, ql;
  logic              low_carry;

  digit_recognition u_dr (.s_top(pr_s[W-1:W-3]), .c_top(pr_c[W-1:W-3]),
                          .neg(neg), .dc(dc), .h_oh(h_oh), .l_oh(l_oh), .wrap(wrap));
  multiples_select  u_ms (.neg(neg), .dc(dc), .wrap(wrap), .h_oh(h_oh), .l_oh(l_oh),
                          .kh(kh), .kl1(kl1), .kl2(kl2), .comp_h(comp_h), .comp_l(comp_l),
                          .qh(qh), .ql1(ql1), .ql2(ql2));

  // carry from the digits below qL (digit W-3) into qL
  assign low_carry = cpa_cy[W-4];
  // carry selection MUX
  assign kl = low_carry ? kl2 : kl1;
  assign ql = low_carry ? ql2 : ql1;

  function automatic logic [W-1:0][3:0] pick(input logic [3:0] k,
      input logic [W-1:0][3:0] a1, a2, a3, a4, a5);
    case (k)
      4'd1: return a1;
      4'd2: return a2;
      4'd3: return a3;
      4'd4: return a4;
      4'd5: return a5;
      default: return '0;
    endcase
  endfunction
  function automatic logic [W-1:0][3:0] shl(input logic [W-1:0][3:0] v, input int s);
    logic [W-1:0][3:0] o;
    for (int i = 0; i < W; i++) o[i] = (i >= s) ? v[i-s] : 4'd0;
    return o;
  endfunction

  logic [W-1:0][3:0] mag_h, mag_l, ncomp_h, ncomp_l, mult_h, mult_l;
  logic              one_h, one_l;
  always_comb begin
    logic [3:0] ah, al;
    ah    = (kh < 0) ? 4'(-kh) : 4'(kh);
    al    = (kl < 0) ? 4'(-kl) : 4'(kl);
    mag_h = shl(pick(ah, m1, m2, m3, m4, m5), 1);   // |qH| * 10D'
    mag_l = pick(al, m1, m2, m3, m4, m5);           // |qL| * D'
    one_h = (kh < 0);
    one_l = (kl < 0);
  end
  // Negative blocks (9's complement; the '1' goes into a free carry slot)
  bcd_nines_comp #(.N(W)) u_negh (.a(mag_h), .y(ncomp_h));
  bcd_nines_comp #(.N(W)) u_negl (.a(mag_l), .y(ncomp_l));
  assign mult_h = one_h ? ncomp_h : mag_h;
  assign mult_l = one_l ? ncomp_l : mag_l;

  logic [W-1:0][3:0] comp_s;
  logic [W-1:0]      comp_c;
  compensation_table u_ct (.comp_h(comp_h), .comp_l(comp_l), .d1(m1),
                           .p110_s(p110_s), .p110_c(p110_c), .n110_s(n110_s), .n110_c(n110_c),
                           .sum(comp_s), .carry(comp_c));

  // ---------------- logic block: recode R to 1-bit carries
  logic [W-1:0][3:0] rs1;
  logic [W-1:0]      rc1;
  pr_recode #(.W(W)) u_rec (.s(pr_s), .c(pr_c), .s1(rs1), .c1(rc1));

  // ---------------- MUX for reuse + DCSAs
  logic [W-1:0][3:0] ax, ay, bx, by, sa, sb, sc;
  logic [W-1:0]      aci, bci, ca, cb, cc;
  logic [W-1:0][1:0] c2;

  // pre-scaling outputs: shift by 'sh' digits into the W frame (top dropped)
  function automatic logic [W-1:0][3:0] fr(input logic [PW-1:0][3:0] v, input int sh);
    logic [W-1:0][3:0] o;
    for (int i = 0; i < W; i++) o[i] = (i - sh >= 0 && i - sh < PW) ? v[i-sh] : 4'd0;
    return o;
  endfunction
  function automatic logic [W-1:0] frc(input logic [PW-1:0] v, input int sh);
    logic [W-1:0] o;
    for (int i = 0; i < W; i++) o[i] = (i - sh >= 0 && i - sh < PW) ? v[i-sh] : 1'b0;
    return o;
  endfunction

  always_comb begin
    logic [W-1:0][3:0] n1sh1, n1sh2;
    ax = '0; ay = '0; aci = '0; bx = '0; by = '0; bci = '0;
    for (int i = 0; i < W; i++) begin
      n1sh1[i] = (i >= 3) ? 4'd9 - m1[i-1] : 4'd0;
      n1sh2[i] = (i >= 4) ? 4'd9 - m1[i-2] : 4'd0;
    end
    unique case (mode)
      M_PS_X: begin   // divisor terms: weight 10^0 of the pre-scaler -> sign digit
        ax = fr(ps_s0, 1); ay = fr(ps_s1, 1); aci = frc(ps_c0, 1);
        bx = fr(ps_s2, 1); by = fr(ps_s3, 1); bci = frc(ps_c1, 1);
      end
      M_ADD_X: begin  // dividend terms: weight 10^1 -> sign digit, i.e. X'/10
        ax = fr(ps_s0, 0); ay = fr(ps_s1, 0); aci = frc(ps_c0, 0);
        bx = fr(ps_s2, 0); by = fr(ps_s3, 0); bci = frc(ps_c1, 0);
      end
      M_MUL3: begin   // +110D' = 100D' + 10D'; -110D' = -100D' - 10D'
        ax = shl(m1, 2); ay = shl(m1, 1);
        bx = n1sh2;      by = n1sh1;      bci[3] = 1'b1; bci[4] = 1'b1;
      end
      M_ITER: begin
        ax = shl(rs1, 2); ay = mult_l; aci = {rc1[W-3:0], 2'b00}; aci[0] = one_l;
        bx = mult_h;      by = comp_s; bci = comp_c;             bci[0] = one_h;
      end
      default: ;
    endcase
  end

  dcsa #(.N(W)) u_dcsa_a (.x(ax), .y(ay), .ci(aci), .s(sa), .co(ca));
  dcsa #(.N(W)) u_dcsa_b (.x(bx), .y(by), .ci(bci), .s(sb), .co(cb));
  dcsa #(.N(W)) u_dcsa_c (.x(sa), .y(sb), .ci(ca),  .s(sc), .co(cc));
  carry_combine #(.W(W)) u_cc (.ca(cb), .cb(cc), .c2(c2));

  // ---------------- on-the-fly conversion and rounding
  logic [QDIG-1:0][3:0] qraw;
  otf_converter u_otf (.clk(clk), .rst_n(rst_n), .clr(mode == M_ADD_X), .en(mode == M_ITER),
                       .qh(qh), .ql(ql), .q(qraw));

  logic [NDIG-1:0][3:0] rq;
  logic                 rlz, rcar, r_neg, r_zero;
  assign r_neg  = (cpa_s[W-1] == 4'd9);
  assign r_zero = (cpa_s == '0);
  round_norm u_rn (.q(qraw), .r_neg(r_neg), .r_zero(r_zero), .c(rq), .lz(rlz), .carry(rcar));

  // ---------------- registers
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      pr_s <= '0; pr_c <= '0;
      m1 <= '0; m2 <= '0; m3 <= '0; m4 <= '0; m5 <= '0;
      p110_s <= '0; p110_c <= '0; n110_s <= '0; n110_c <= '0;
      q_bcd <= '0; lz <= 1'b0; rnd_carry <= 1'b0;
    end else begin
      unique case (mode)
        M_PS_X, M_ADD_X, M_ITER: begin
          pr_s <= sc;
          pr_c <= c2;
          if (mode == M_ADD_X) begin   // D' (carry-save, from M_PS_X) made compact
            m1 <= cpa_s; m2 <= d2; m4 <= d4; m5 <= d5;
          end
        end
        M_MUL3: begin
          m3 <= cpa_s;
          p110_s <= sa; p110_c <= ca;
          n110_s <= sb; n110_c <= cb;
        end
        M_ROUND: begin
          q_bcd <= rq; lz <= rlz; rnd_carry <= rcar;
        end
        default: ;
      endcase
    end

  // The partial remainder must keep a valid sign digit: 0 or 9 once compact.
  a_sign_ok: assert property (@(posedge clk) disable iff (!rst_n)
                              (mode == M_ITER || mode == M_ROUND) |-> (cpa_s[W-1] == 4'd0 || cpa_s[W-1] == 4'd9));
endmodule
