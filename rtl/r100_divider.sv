// Radix-100 decimal fixed-point divider: pre-scaling module, iteration module
// and controller (Sections 3.3, 4 and 4.4 of the design).
// Operands are normalized 16-digit BCD coefficients x = 0.x1..x16 and
// d = 0.d1..d16 (x1, d1 non-zero). The divisor is pre-scaled into
// D' in [1, 1+1/99) and the dividend by the same factor, so that two quotient
// digits can be read by truncation of the partial remainder in each of nine
// iterations. Before pre-scaling the dividend is aligned: when x >= d it is
// shifted one digit right, so the quotient x/d is always
// Q * 10^(1+shifted) with Q in [0.01, 0.1), i.e. Q has exactly one leading
// zero and 17 significant digits (16 + round digit).
// Interface: 'start' with x_bcd/d_bcd captures the operands; 14 clock edges
// later 'done' pulses with q_bcd = the 16-digit roundTiesToEven quotient
// coefficient and exp_adj such that x/d ~= q * 10^exp_adj (exp_adj = -15,
// -14 or -13 after a rounding carry). 'busy' is high from the cycle after the
// start edge until done. ps_param/ps_exc show the pre-scaling parameter
// chosen for the current divisor (valid from the third cycle on).
module r100_divider
  import r100_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [NDIG-1:0][3:0] x_bcd,
  input  logic [NDIG-1:0][3:0] d_bcd,
  output logic                 busy,
  output logic                 done,
  output logic [NDIG-1:0][3:0] q_bcd,
  output logic signed [5:0]    exp_adj,
  output logic [8:0]           ps_param,  // pre-scaling parameter of this divisor
  output logic [1:0]           ps_exc     // exceptional-parameter shift code
);
  mode_t mode;
  logic  ps_load, ps_sel, ps_cap;
  logic  shifted_q;
  logic [NDIG:0][3:0] xal_q;             // aligned dividend, 17 digits

  r100_ctrl u_ctrl (.clk(clk), .rst_n(rst_n), .start(start), .mode(mode),
                    .ps_load(ps_load), .ps_sel_dividend(ps_sel), .ps_capture(ps_cap),
                    .busy(busy), .done(done));

  // Alignment: BCD vectors compare like unsigned binary numbers.
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      xal_q     <= '0;
      shifted_q <= 1'b0;
    end else if (mode == M_IDLE && start) begin
      shifted_q <= (x_bcd >= d_bcd);
      xal_q     <= (x_bcd >= d_bcd) ? {4'd0, x_bcd} : {x_bcd, 4'd0};
    end

  logic [PW-1:0][3:0] s0, s1, s2, s3;
  logic [PW-1:0]      c0, c1;
  logic [8:0]         pa;
  logic [1:0]         exc;
  prescaler u_ps (.clk(clk), .rst_n(rst_n), .load(ps_load), .sel_dividend(ps_sel),
                  .divisor(d_bcd), .dividend(xal_q), .capture(ps_cap),
                  .s0(s0), .s1(s1), .s2(s2), .s3(s3), .c0(c0), .c1(c1), .pa(pa), .exc(exc));

  assign ps_param = pa;
  assign ps_exc   = exc;

  logic lz, rcar;
  iteration_unit u_it (.clk(clk), .rst_n(rst_n), .mode(mode),
                       .ps_s0(s0), .ps_s1(s1), .ps_s2(s2), .ps_s3(s3), .ps_c0(c0), .ps_c1(c1),
                       .q_bcd(q_bcd), .lz(lz), .rnd_carry(rcar));

  // x/d = Q*10^(1+shifted), Q = q*10^-(16+lz) (times 10 after a rounding carry)
  assign exp_adj = 6'sd1 + 6'(shifted_q) - 6'sd16 - 6'(lz) + 6'(rcar);
endmodule
