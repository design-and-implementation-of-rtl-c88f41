// Multiples selection of the iteration module (Section 4.3.2, Tables 4.4 and
// 4.5 of the design). Quotient digits are the truncated digits of the partial
// remainder: for a plus sign qH = h and qL = l; for a minus sign (10's
// complement) qH = h-9 and qL = l-9. The addend of a digit v is -v times D'
// (times 10 for qH). Only 1..5 D' and their negatives exist, so a digit whose
// addend would be 5..9 D' in magnitude of the wrong kind is taken as the
// complementary multiple plus a compensation of -+10 (qL) or -+100 (qH) D':
//   plus:  h >= 5  -> kh = 10-h, comp_h = -1;  else kh = -h
//   minus: h <= 3  -> kh = -1-h, comp_h = +1;  else kh = 9-h
// (same rule for l). A carry from the digits below qL raises qL by one; it is
// not known yet, so two candidates are given: kl1 (no carry) and kl2 = kl1-1
// (carry); the compensation depends on l only. The quotient digits for the
// on-the-fly conversion are qh, ql1 and ql2 = ql1+1. In the dc case all are
// zero. With 'wrap' (remainder 8.99 read as 9.00, see digit recognition)
// the low carry is already included, so both candidates are the same.
// Combinational.
module multiples_select (
  input  logic              neg,
  input  logic              dc,
  input  logic              wrap,
  input  logic [9:0]        h_oh,
  input  logic [9:0]        l_oh,
  output logic signed [3:0] kh,      // multiple of 10D' to add, -5..5
  output logic signed [3:0] kl1,     // multiple of D' to add, low carry 0
  output logic signed [3:0] kl2,     // multiple of D' to add, low carry 1
  output logic signed [1:0] comp_h,  // x100D' compensation
  output logic signed [1:0] comp_l,  // x10D' compensation
  output logic signed [4:0] qh,      // quotient digits, signed
  output logic signed [4:0] ql1,
  output logic signed [4:0] ql2
);
  function automatic logic [3:0] oh2int(input logic [9:0] oh);
    logic [3:0] v;
    v = 4'd0;
    for (int i = 0; i < 10; i++) if (oh[i]) v = 4'(i);
    return v;
  endfunction

  always_comb begin
    logic signed [5:0] h, l;
    h = 6'(oh2int(h_oh));
    l = 6'(oh2int(l_oh));
    if (!neg) begin
      comp_h = (h >= 5) ? -2'sd1 : 2'sd0;
      kh     = (h >= 5) ? 4'(6'sd10 - h) : 4'(-h);
      comp_l = (l >= 5) ? -2'sd1 : 2'sd0;
      kl1    = (l >= 5) ? 4'(6'sd10 - l) : 4'(-l);
      qh     = 5'(h);
      ql1    = 5'(l);
    end else begin
      comp_h = (h <= 3) ? 2'sd1 : 2'sd0;
      kh     = (h <= 3) ? 4'(-6'sd1 - h) : 4'(6'sd9 - h);
      comp_l = (l <= 3) ? 2'sd1 : 2'sd0;
      kl1    = (l <= 3) ? 4'(-6'sd1 - l) : 4'(6'sd9 - l);
      qh     = 5'(h - 6'sd9);
      ql1    = 5'(l - 6'sd9);
    end
    kl2 = wrap ? kl1 : kl1 - 4'sd1;
    ql2 = wrap ? ql1 : ql1 + 5'sd1;
    if (dc) begin
      kh = '0; kl1 = '0; kl2 = '0; comp_h = '0; comp_l = '0;
      qh = '0; ql1 = '0; ql2 = '0;
    end
  end
endmodule
