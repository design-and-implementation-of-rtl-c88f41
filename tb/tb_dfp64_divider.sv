// End-to-end testbench of the decimal64 divider, at its default parameters.
// Operands are built from random or directed signs, exponents and
// coefficients (including coefficients with leading zeros, zero dividends
// and zero divisors) and packed to DPD by the testbench's own encoder, which
// is a table produced by inverting its own declet decoder. The expected
// result is computed independently with integer arithmetic: the exact
// quotient of the coefficients is scaled to 16 significant digits, rounded
// to nearest with ties to even, and given the exponent
// ex - ed + 398 + (scaling). The DUT's result is decoded by the testbench and
// compared field by field; a 14-cycle latency from start to done is checked
// for every division. Each mechanism of the design is counted and must
// occur at least once: leading-zero removal of either operand, dividend
// shift, compensation, a remainder of exactly -1, negative quotient digits, low carry, don't-care case,
// exceptional pre-scaling parameters, round-up, ties, divide by zero, zero
// dividend and the combination-field form for leading digits 8 and 9.
module tb_dfp64_divider;
  import r100_pkg::*;
  localparam int NRAND = 2000;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [63:0] fx = '0, fd = '0, fq;
  logic busy, done, dbz, erange, spec;
  int checks = 0, failures = 0;

  dfp64_divider dut (.clk(clk), .rst_n(rst_n), .start(start), .fx(fx), .fd(fd),
                     .busy(busy), .done(done), .fq(fq), .div_by_zero(dbz),
                     .exp_range_err(erange), .special_in(spec));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_wrap = 0, n_comp = 0, n_negq = 0, n_lowc = 0, n_dc = 0, n_exc = 0, n_shift = 0, n_lzx = 0, n_lzd = 0;
  int n_up = 0, n_tie = 0, n_dbz = 0, n_xz = 0, n_big = 0;
  always @(posedge clk) if (rst_n && dut.u_div.u_it.mode == M_ITER) begin
    if (dut.u_div.u_it.comp_h != 0 || dut.u_div.u_it.comp_l != 0) n_comp++;
    if (dut.u_div.u_it.qh < 0 || dut.u_div.u_it.ql < 0) n_negq++;
    if (dut.u_div.u_it.low_carry) n_lowc++;
    if (dut.u_div.u_it.dc) n_dc++;
    if (dut.u_div.u_it.wrap) n_wrap++;
  end
  always @(posedge clk) if (rst_n && dut.u_div.u_ctrl.mode == M_ROUND && dut.u_div.ps_exc != 0) n_exc++;

  // ---------------- testbench DPD model
  logic [9:0] enc_tab [1000];
  function automatic int dec_declet(input logic [9:0] b);
    // b[9:0] = p q r s t u v w x y
    int d2, d1, d0;
    if (!b[3]) begin d2 = b[9:7]; d1 = b[6:4]; d0 = b[2:0]; end
    else case (b[2:1])
      2'b00: begin d2 = b[9:7]; d1 = b[6:4]; d0 = 8 + b[0]; end
      2'b01: begin d2 = b[9:7]; d1 = 8 + b[4]; d0 = 2 * b[6:5] + b[0]; end
      2'b10: begin d2 = 8 + b[7]; d1 = b[6:4]; d0 = 2 * b[9:8] + b[0]; end
      default: case (b[6:5])
        2'b00: begin d2 = 8 + b[7]; d1 = 8 + b[4]; d0 = 2 * b[9:8] + b[0]; end
        2'b01: begin d2 = 8 + b[7]; d1 = 2 * b[9:8] + b[4]; d0 = 8 + b[0]; end
        2'b10: begin d2 = b[9:7]; d1 = 8 + b[4]; d0 = 8 + b[0]; end
        default: begin d2 = 8 + b[7]; d1 = 8 + b[4]; d0 = 8 + b[0]; end
      endcase
    endcase
    return 100 * d2 + 10 * d1 + d0;
  endfunction

  function automatic logic [63:0] pack(input bit s, input int e, input logic [127:0] c);
    logic [63:0] w;
    int msd;
    w[63] = s;
    for (int k = 0; k < 5; k++) begin w[10*k +: 10] = enc_tab[int'(c % 1000)]; c = c / 1000; end
    msd = int'(c);
    if (msd < 8) w[62:58] = {2'(e >> 8), 3'(msd)};
    else         w[62:58] = {2'b11, 2'(e >> 8), 1'(msd)};
    w[57:50] = 8'(e);
    return w;
  endfunction

  typedef struct { bit s; int e; logic [127:0] c; bit inf; } dec_t;
  function automatic dec_t unpack(input logic [63:0] w);
    dec_t r;
    int msd;
    r.s = w[63];
    r.inf = (w[62:58] == 5'b11110);
    if (w[62:61] != 2'b11) begin r.e = {w[62:61], w[57:50]}; msd = w[60:58]; end
    else begin r.e = {w[60:59], w[57:50]}; msd = 8 + w[58]; end
    r.c = 128'(msd);
    for (int k = 4; k >= 0; k--) r.c = r.c * 1000 + 128'(dec_declet(w[10*k +: 10]));
    return r;
  endfunction

  function automatic logic [127:0] pow10(input int n);
    logic [127:0] r = 1;
    for (int i = 0; i < n; i++) r = r * 10;
    return r;
  endfunction
  function automatic int ndigits(input logic [127:0] v);
    int n = 0;
    while (v != 0) begin n++; v = v / 10; end
    return n;
  endfunction

  // ---------------- one division
  task automatic run(input bit sx, input int ex, input logic [127:0] cx,
                     input bit sd, input int ed, input logic [127:0] cd);
    logic [127:0] num, qi, ri, P15, P16;
    int k, cyc, eexp;
    bit up, expect_inf, expect_zero;
    dec_t got;
    P15 = pow10(15); P16 = pow10(16);
    expect_inf = (cd == 0);
    expect_zero = (cx == 0) && !expect_inf;
    if (expect_inf) n_dbz++;
    if (expect_zero) n_xz++;
    if (cx != 0 && ndigits(cx) < 16) n_lzx++;
    if (cd != 0 && ndigits(cd) < 16) n_lzd++;
    if (cx >= P15 * 8 || cd >= P15 * 8) n_big++;
    qi = 0; eexp = ex - ed + 398;
    if (!expect_inf && !expect_zero) begin
      // x/d = (cx/cd) * 10^(ex-ed); pick k so that Q has 16 digits
      k = 15 + ndigits(cd) - ndigits(cx);
      num = cx * pow10(k > 0 ? k : 0);
      if (k < 0) begin $display("bad k"); k = 0; end
      if (num / cd < P15) begin k++; num = num * 10; end
      if (cx * pow10(16 - ndigits(cx)) >= cd * pow10(16 - ndigits(cd))) n_shift++;
      qi = num / cd; ri = num % cd;
      up = (2 * ri > cd) || (2 * ri == cd && qi[0]);
      if (2 * ri == cd) n_tie++;
      if (up) n_up++;
      qi = qi + 128'(up);
      if (qi == P16) begin qi = P15; k--; end
      eexp = ex - ed + 398 - k;
    end
    if (eexp < 0) eexp = 0;
    if (eexp > 767) eexp = 767;
    @(negedge clk);
    fx = pack(sx, ex, cx); fd = pack(sd, ed, cd); start = 1'b1;
    @(posedge clk); cyc = 0;
    @(negedge clk); start = 1'b0; fx = '0; fd = '0;
    while (!done) begin @(posedge clk); cyc++; @(negedge clk); end
    got = unpack(fq);
    checks += 4;
    if (cyc != 14) begin failures++; $display("latency %0d, expected 14", cyc); end
    if (dbz != expect_inf) begin failures++; $display("div_by_zero flag wrong"); end
    if (got.s != (sx ^ sd)) begin failures++; $display("sign wrong"); end
    if (expect_inf) begin
      if (!got.inf) begin failures++; $display("expected infinity, got %h", fq); end
    end else if (got.c != qi || got.e != eexp) begin
      failures++;
      $display("MISMATCH %0d e%0d / %0d e%0d: got %0d e%0d expected %0d e%0d",
               cx, ex, cd, ed, got.c, got.e, qi, eexp);
    end
  endtask

  function automatic logic [127:0] rnd_coef(input int nd);
    logic [127:0] r = 128'($urandom_range(9, 1));
    for (int i = 1; i < nd; i++) r = r * 10 + 128'($urandom_range(9));
    return r;
  endfunction

  initial begin
    // declet encoder table: first (canonical) declet decoding to each value
    for (int v = 0; v < 1000; v++) enc_tab[v] = '0;
    for (int b = 1023; b >= 0; b--) enc_tab[dec_declet(10'(b))] = 10'(b);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run(0, 398, pow10(15), 0, 398, pow10(15));               // 1/1
    run(0, 398, 1, 0, 398, 3);                                // 1/3 with leading zeros
    run(1, 400, 22, 0, 390, 7);
    run(0, 398, 128'd9999999999999999, 1, 398, 128'd8888888888888888); // big leading digits
    run(0, 398, 5, 0, 398, 2);                                // 2.5 exact
    run(0, 398, pow10(15) * 2 + 1, 0, 398, 2 * pow10(15));    // tie
    run(0, 398, pow10(15) * 2 + 3, 0, 398, 2 * pow10(15));    // tie
    run(0, 398, 7, 1, 398, 0);                                // divide by zero
    run(0, 398, 8, 0, 398, 8008);                             // remainder reaches -1
    run(1, 398, 0, 0, 300, 12345);                            // zero dividend
    run(0, 398, pow10(15) * 3, 0, 398, 909 * pow10(13) + 17); // exceptional parameter
    for (int i = 0; i < NRAND; i++) begin
      int nx, nd;
      nx = $urandom_range(16, 1); nd = $urandom_range(16, 1);
      if (i % 4 != 0) begin nx = 16; nd = 16; end
      run(1'($urandom), 200 + $urandom_range(400), rnd_coef(nx),
          1'($urandom), 200 + $urandom_range(400), rnd_coef(nd));
    end
    checks += 16;
    if (n_comp == 0)  begin failures++; $display("compensation never used"); end
    if (n_negq == 0)  begin failures++; $display("no negative quotient digit"); end
    if (n_lowc == 0)  begin failures++; $display("low carry never selected"); end
    if (n_dc == 0)    begin failures++; $display("don't-care case never seen"); end
    if (n_wrap == 0)  begin failures++; $display("remainder -1 case never seen"); end
    if (n_exc == 0)   begin failures++; $display("no exceptional parameter"); end
    if (n_shift == 0) begin failures++; $display("dividend never shifted"); end
    if (n_lzx == 0)   begin failures++; $display("dividend never normalized"); end
    if (n_lzd == 0)   begin failures++; $display("divisor never normalized"); end
    if (n_up == 0)    begin failures++; $display("never rounded up"); end
    if (n_tie == 0)   begin failures++; $display("no tie"); end
    if (n_dbz == 0)   begin failures++; $display("no divide by zero"); end
    if (n_xz == 0)    begin failures++; $display("no zero dividend"); end
    if (n_big == 0)   begin failures++; $display("no leading digit 8 or 9"); end
    if (spec)         begin failures++; $display("special flag set on finite operands"); end
    if (erange)       begin failures++; $display("exponent range flag on in-range result"); end
    $display("events: wrap=%0d comp=%0d negq=%0d lowc=%0d dc=%0d exc=%0d shift=%0d lzx=%0d lzd=%0d up=%0d tie=%0d dbz=%0d xz=%0d big=%0d",
             n_wrap, n_comp, n_negq, n_lowc, n_dc, n_exc, n_shift, n_lzx, n_lzd, n_up, n_tie, n_dbz, n_xz, n_big);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
