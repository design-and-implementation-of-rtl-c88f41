// IEEE 754-2008 decimal64 divider built around a radix-100 fixed-point
// divider. Both operands are unpacked from DPD to BCD, their coefficients are
// normalized (leading zeros shifted out and counted), and the coefficients
// are divided in 14 cycles by the radix-100 unit, which also rounds
// (roundTiesToEven) and removes the quotient's leading zero. In parallel the
// sign is the XOR of the operand signs and the exponent is computed from the
// operand exponents, the shift counts and the divider's adjustment; the
// result is packed back to DPD.
// Special cases: a zero divisor gives an infinity of the quotient's sign and
// raises div_by_zero; a zero dividend (non-zero divisor) gives a zero with the
// quotient's sign and the exponent ex - ed + 398 (clamped).
// Reset: asynchronous, active low, on every register. In both cases the
// divider still runs, on a dummy coefficient, so the latency is unchanged.
// NaN and infinity inputs are only flagged (special_in), and exponent
// overflow/underflow only clamps the exponent and raises exp_range_err.
// Interface: fx, fd are sampled at the clock edge where start is high (and
// busy low). 14 edges later done pulses for one cycle; fq and the flags are
// valid from then until the next start. The block structure follows the
// document's top-level figure; the handshake and the special-case policy are
// this design's choices.
module dfp64_divider
  import r100_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [63:0] fx,
  input  logic [63:0] fd,
  output logic        busy,
  output logic        done,
  output logic [63:0] fq,
  output logic        div_by_zero,
  output logic        exp_range_err,  // quotient exponent was clamped
  output logic        special_in      // an operand encodes infinity or NaN
);
  localparam logic [NDIG-1:0][3:0] ONE = {4'd1, {(NDIG-1){4'd0}}};

  // ---- unpack and normalize (combinational, sampled at start) ----
  logic                 sx, sd, spx, spd;
  logic [9:0]           ex, ed;
  logic [NDIG-1:0][3:0] cx, cd, nx, nd;
  logic [4:0]           lzx, lzd;
  logic                 xz, dz;

  dpd_decode u_decx (.w(fx), .sign(sx), .exp(ex), .coef(cx), .special(spx));
  dpd_decode u_decd (.w(fd), .sign(sd), .exp(ed), .coef(cd), .special(spd));
  lz_shifter u_shx  (.a(cx), .y(nx), .lz(lzx));
  lz_shifter u_shd  (.a(cd), .y(nd), .lz(lzd));
  div_zero_detect u_dzd (.d(cd), .dz(dz));
  div_zero_detect u_dzx (.d(cx), .dz(xz));

  logic start_ok;
  assign start_ok = start && !busy;

  // operand information needed after the division
  logic       sx_q, sd_q, xz_q, dz_q, sp_q;
  logic [9:0] ex_q, ed_q;
  logic [4:0] lzx_q, lzd_q;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      sx_q <= 1'b0; sd_q <= 1'b0; xz_q <= 1'b0; dz_q <= 1'b0; sp_q <= 1'b0;
      ex_q <= '0; ed_q <= '0; lzx_q <= '0; lzd_q <= '0;
    end else if (start_ok) begin
      sx_q <= sx; sd_q <= sd; xz_q <= xz; dz_q <= dz; sp_q <= spx | spd;
      ex_q <= ex; ed_q <= ed; lzx_q <= lzx; lzd_q <= lzd;
    end

  // ---- coefficient division ----
  logic [NDIG-1:0][3:0] q;
  logic signed [5:0]    adj;
  r100_divider u_div (.clk(clk), .rst_n(rst_n), .start(start_ok),
                      .x_bcd(xz ? ONE : nx), .d_bcd(dz ? ONE : nd),
                      .busy(busy), .done(done), .q_bcd(q), .exp_adj(adj),
                      .ps_param(), .ps_exc());

  // ---- exponent, sign and packing ----
  logic [9:0] eq;
  logic       sq, erange;
  exponent_calc u_exp (.ex(ex_q), .ed(ed_q), .lzx(xz_q ? 5'd0 : lzx_q), .lzd(xz_q ? 5'd0 : lzd_q),
                       .adj(xz_q ? 6'sd0 : adj), .sx(sx_q), .sd(sd_q),
                       .eq(eq), .sq(sq), .range_err(erange));

  dpd_encode u_enc (.sign(sq), .exp(eq), .coef(xz_q ? '0 : q), .inf(dz_q), .w(fq));
  assign div_by_zero   = dz_q;
  assign exp_range_err = erange & ~dz_q;
  assign special_in    = sp_q;
endmodule
