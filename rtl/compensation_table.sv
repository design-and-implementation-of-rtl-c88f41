// Compensation table of the iteration module (Sections 3.3.3 and 4.3.2 of
// the design). Returns, in carry-save form (BCD sum + 1-bit carry per digit),
// the compensation addend comp_h*100D' + comp_l*10D'. Both compensations of a
// digit pair have the same sign, so the values are 0, +-10D', +-100D' and
// +-110D'. The first four are D' shifted one or two digits (mod 10); their
// negatives are the 9's complement of the shifted D' above the shifted LSB
// position plus a '1' there: D' has two zero digits at the bottom of the W
// frame, so after a shift by s the '1' sits in carry slot s+2, which keeps
// slot 0 free for the quotient digit's own '1'. +-110D' come from registers
// filled during the pre-calculation. Combinational.
module compensation_table
  import r100_pkg::*;
(
  input  logic signed [1:0]  comp_h,
  input  logic signed [1:0]  comp_l,
  input  logic [W-1:0][3:0]  d1,        // compact D'
  input  logic [W-1:0][3:0]  p110_s,    // +110D' carry-save
  input  logic [W-1:0]       p110_c,
  input  logic [W-1:0][3:0]  n110_s,    // -110D' carry-save
  input  logic [W-1:0]       n110_c,
  output logic [W-1:0][3:0]  sum,
  output logic [W-1:0]       carry
);
  function automatic logic [W-1:0][3:0] shl(input logic [W-1:0][3:0] v, input int s);
    logic [W-1:0][3:0] o;
    for (int i = 0; i < W; i++) o[i] = (i >= s) ? v[i-s] : 4'd0;
    return o;
  endfunction
  function automatic logic [W-1:0][3:0] negshl(input logic [W-1:0][3:0] v, input int s);
    logic [W-1:0][3:0] o;
    for (int i = 0; i < W; i++) o[i] = (i >= s + 2) ? 4'd9 - v[i-s] : 4'd0;
    return o;
  endfunction

  always_comb begin
    sum   = '0;
    carry = '0;
    unique case ({comp_h, comp_l})
      {2'sd0, 2'sd1}:   sum = shl(d1, 1);
      {2'sd1, 2'sd0}:   sum = shl(d1, 2);
      {2'sd0, -2'sd1}:  begin sum = negshl(d1, 1); carry[3] = 1'b1; end
      {-2'sd1, 2'sd0}:  begin sum = negshl(d1, 2); carry[4] = 1'b1; end
      {2'sd1, 2'sd1}:   begin sum = p110_s; carry = p110_c; end
      {-2'sd1, -2'sd1}: begin sum = n110_s; carry = n110_c; end
      default: ;
    endcase
  end
endmodule
