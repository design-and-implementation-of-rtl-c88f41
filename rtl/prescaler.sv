// Pre-scaling module (Section 4.2, Figure 4.1 of the design).
// Multiplies the divisor, and in the following cycle the dividend, by the
// pre-scaling parameter so that the scaled divisor D' lies in [1, 1+1/99).
//  * Input MUX + register: the operand (divisor or aligned dividend) as an
//    MW-digit vector, digit j of weight 10^(j-18).
//  * Doubler, quintupler and the "Logic Block": D_m = 5D, 2D or D for a
//    divisor MSD of 1, 2..4 or 5..9 (Table 3.3). The choice made for the
//    divisor is kept in a register and applied to the dividend.
//  * Look-up table, first-digit detection and combiner give the 3-digit
//    parameter P = p0.p1p2; for the dividend the registered P is used.
//  * Split multiples (eq. 3.16): p0 selects D_m or 2D_m; each lower digit
//    is split into a term from {0,1,2,5,10}D_m and a term from
//    {0,1,2,-2,-1}D_m. The Shifter places the five terms at their weights
//    (one further place down for an exception) in a PW-digit 10's
//    complement frame, digit k of weight 10^(k-21), filling negative terms
//    with 9s.
//  * One DCSA reduces the five sums to four; the '1's of the two negative
//    terms go to the carry inputs. Outputs: four sums and two carry vectors,
//    registered, to be added by the iteration module's DCSAs.
// Timing: 'load' captures an operand; during the next cycle the terms are
// formed and 'capture' registers them (and, for a divisor, P and the
// exception code). One operand per cycle.
module prescaler
  import r100_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  load,          // capture operand into input register
  input  logic                  sel_dividend,  // input MUX: 0 divisor, 1 dividend
  input  logic [NDIG-1:0][3:0]  divisor,       // 0.d1..d16, d1 != 0
  input  logic [NDIG:0][3:0]    dividend,      // 17 digits 10^-1..10^-17
  input  logic                  capture,       // register the pre-scaling outputs
  output logic [PW-1:0][3:0]    s0, s1, s2, s3,
  output logic [PW-1:0]         c0, c1,
  output logic [8:0]            pa,            // {MSD is 2, middle digit, last digit}
  output logic [1:0]            exc
);
  logic [MW-1:0][3:0] in_q, dbl, quin, dm, dm2, dm5, ndm, ndm2;
  logic               is_dividend_q;
  logic [1:0]         fsel_q, fsel;            // 0: x1, 1: x2, 2: x5
  logic [8:0]         pa_q, pa_lut, pa_use;
  logic [1:0]         exc_q, exc_lut, exc_use;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      in_q          <= '0;
      is_dividend_q <= 1'b0;
    end else if (load) begin
      is_dividend_q <= sel_dividend;
      for (int j = 0; j < MW; j++) in_q[j] <= 4'd0;
      if (sel_dividend) for (int j = 0; j <= NDIG; j++) in_q[j+1] <= dividend[j];
      else              for (int j = 0; j <  NDIG; j++) in_q[j+2] <= divisor[j];
    end

  bcd_doubler    #(.N(MW)) u_dbl  (.a(in_q), .y(dbl));
  bcd_quintupler #(.N(MW)) u_quin (.a(in_q), .y(quin));

  // Logic Block: divisor MSD -> D_m selection (Table 3.3).
  always_comb begin
    if (is_dividend_q)            fsel = fsel_q;
    else if (in_q[17] == 4'd1)    fsel = 2'd2;
    else if (in_q[17] <= 4'd4)    fsel = 2'd1;
    else                          fsel = 2'd0;
    case (fsel)
      2'd1:    dm = dbl;
      2'd2:    dm = quin;
      default: dm = in_q;
    endcase
  end

  prescale_lut u_lut (.idx(dm[17:15]), .lsd2(pa_lut[7:0]), .msd2(pa_lut[8]), .exc(exc_lut));

  assign pa_use  = is_dividend_q ? pa_q  : pa_lut;
  assign exc_use = is_dividend_q ? exc_q : exc_lut;

  bcd_doubler    #(.N(MW)) u_dbl2 (.a(dm), .y(dm2));
  bcd_quintupler #(.N(MW)) u_quin2(.a(dm), .y(dm5));
  bcd_nines_comp #(.N(MW)) u_neg1 (.a(dm),  .y(ndm));
  bcd_nines_comp #(.N(MW)) u_neg2 (.a(dm2), .y(ndm2));

  // Place an MW-digit multiple at parameter weight 10^-w in the PW frame.
  function automatic logic [PW-1:0][3:0] place(input logic [MW-1:0][3:0] v, input int w,
                                               input logic neg);
    logic [PW-1:0][3:0] o;
    for (int k = 0; k < PW; k++) begin
      int m;
      m = k - 3 + w;
      o[k] = (m >= 0 && m < MW) ? v[m] : (neg ? 4'd9 : 4'd0);
    end
    return o;
  endfunction

  // Split of one parameter digit at weight w into an A term and a B term.
  function automatic void split(input logic [3:0] d, input int w,
                                input logic [MW-1:0][3:0] m1, m2, m5, n1, n2,
                                output logic [PW-1:0][3:0] a_t, b_t, output logic b_neg);
    a_t = '0; b_t = '0; b_neg = 1'b0;
    case (d)
      4'd1: a_t = place(m1, w, 1'b0);
      4'd2: a_t = place(m2, w, 1'b0);
      4'd3: begin a_t = place(m2, w, 1'b0); b_t = place(m1, w, 1'b0); end
      4'd4: begin a_t = place(m2, w, 1'b0); b_t = place(m2, w, 1'b0); end
      4'd5: a_t = place(m5, w, 1'b0);
      4'd6: begin a_t = place(m5, w, 1'b0); b_t = place(m1, w, 1'b0); end
      4'd7: begin a_t = place(m5, w, 1'b0); b_t = place(m2, w, 1'b0); end
      4'd8: begin a_t = place(m1, w-1, 1'b0); b_t = place(n2, w, 1'b1); b_neg = 1'b1; end
      4'd9: begin a_t = place(m1, w-1, 1'b0); b_t = place(n1, w, 1'b1); b_neg = 1'b1; end
      default: ;
    endcase
  endfunction

  logic [PW-1:0][3:0] t0, a_mid, b_mid, a_lsd, b_lsd, sum0;
  logic               neg_mid, neg_lsd;
  logic [PW-1:0]      cin0, cy0;

  always_comb begin
    int w_mid, w_lsd;
    w_mid = exc_use[1] ? 2 : 1;
    w_lsd = exc_use[0] ? 3 : 2;
    t0 = pa_use[8] ? place(dm2, 0, 1'b0) : place(dm, 0, 1'b0);
    split(pa_use[7:4], w_mid, dm, dm2, dm5, ndm, ndm2, a_mid, b_mid, neg_mid);
    split(pa_use[3:0], w_lsd, dm, dm2, dm5, ndm, ndm2, a_lsd, b_lsd, neg_lsd);
    cin0 = {{(PW-1){1'b0}}, neg_mid};
  end

  dcsa #(.N(PW)) u_dcsa (.x(t0), .y(a_mid), .ci(cin0), .s(sum0), .co(cy0));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      s0 <= '0; s1 <= '0; s2 <= '0; s3 <= '0; c0 <= '0; c1 <= '0;
      pa_q <= '0; exc_q <= '0; fsel_q <= '0;
    end else if (capture) begin
      s0 <= sum0;  s1 <= b_mid;  s2 <= a_lsd;  s3 <= b_lsd;
      c0 <= cy0;   c1 <= {{(PW-1){1'b0}}, neg_lsd};
      if (!is_dividend_q) begin
        pa_q   <= pa_lut;
        exc_q  <= exc_lut;
        fsel_q <= fsel;
      end
    end

  assign pa  = pa_q;
  assign exc = exc_q;
endmodule
