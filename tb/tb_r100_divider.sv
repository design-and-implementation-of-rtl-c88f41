// Self-checking testbench of the radix-100 coefficient divider.
// Operands are normalized 16-digit BCD coefficients: directed corner cases
// (equal operands, divisors that select the exceptional pre-scaling
// parameters, exact halves that round to even, extreme ratios) followed by
// random pairs. Each result is compared with a reference computed with wide
// integer arithmetic: Q = floor(X*10^k / D) with k = 15 when X >= D and 16
// otherwise, rounded to nearest with ties to even; exp_adj must be -k (+1
// after a rounding carry). The latency from the start edge to done must be
// 14 clock edges. Internal events are counted through hierarchical
// references and each must occur at least once: compensation, negative
// quotient digits, low carry selection, the don't-care case, a remainder of
// exactly -1, exceptional
// parameters, dividend shift, round-up, tie, negative and zero final
// remainders.
module tb_r100_divider;
  import r100_pkg::*;
  localparam int NRAND = 3000;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [NDIG-1:0][3:0] x, d, q;
  logic busy, done;
  logic signed [5:0] adj;
  logic [8:0] pparam;
  logic [1:0] pexc;
  int checks = 0, failures = 0;

  r100_divider dut (.clk(clk), .rst_n(rst_n), .start(start), .x_bcd(x), .d_bcd(d),
                    .busy(busy), .done(done), .q_bcd(q), .exp_adj(adj),
                    .ps_param(pparam), .ps_exc(pexc));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- event counters
  int n_wrap = 0, n_comp = 0, n_negq = 0, n_lowc = 0, n_dc = 0, n_exc = 0, n_shift = 0;
  int n_up = 0, n_tie = 0, n_rneg = 0, n_rzero = 0;
  always @(posedge clk) if (rst_n && dut.u_it.mode == M_ITER) begin
    if (dut.u_it.comp_h != 0 || dut.u_it.comp_l != 0) n_comp++;
    if (dut.u_it.qh < 0 || dut.u_it.ql < 0) n_negq++;
    if (dut.u_it.low_carry) n_lowc++;
    if (dut.u_it.dc) n_dc++;
    if (dut.u_it.wrap) n_wrap++;
  end
  always @(posedge clk) if (rst_n && dut.u_it.mode == M_ROUND) begin
    if (dut.u_it.r_neg) n_rneg++;
    if (dut.u_it.r_zero) n_rzero++;
  end

  function automatic logic [127:0] to_int(input logic [NDIG-1:0][3:0] v);
    logic [127:0] r = 0;
    for (int i = NDIG - 1; i >= 0; i--) r = r * 10 + 128'(v[i]);
    return r;
  endfunction
  function automatic logic [NDIG-1:0][3:0] to_bcd(input logic [127:0] n);
    logic [NDIG-1:0][3:0] r;
    for (int i = 0; i < NDIG; i++) begin r[i] = 4'(n % 10); n = n / 10; end
    return r;
  endfunction
  function automatic logic [NDIG-1:0][3:0] rnd_norm();
    logic [NDIG-1:0][3:0] r;
    for (int i = 0; i < NDIG; i++) r[i] = 4'($urandom_range(9));
    r[NDIG-1] = 4'($urandom_range(9, 1));
    return r;
  endfunction

  logic [127:0] P15, P16;
  task automatic run(input logic [NDIG-1:0][3:0] xa, input logic [NDIG-1:0][3:0] da);
    logic [127:0] xi, di, num, qi, ri;
    int k, cyc;
    logic up, carry;
    xi = to_int(xa); di = to_int(da);
    k = (xi >= di) ? 15 : 16;
    num = xi * ((k == 15) ? P15 : P16);
    qi = num / di; ri = num % di;
    up = (2 * ri > di) || (2 * ri == di && qi[0]);
    if (2 * ri == di) n_tie++;
    if (up) n_up++;
    if (xi >= di) n_shift++;
    qi = qi + 128'(up);
    carry = (qi == P16);
    if (carry) qi = P15;
    @(negedge clk);
    x = xa; d = da; start = 1'b1;
    @(posedge clk); cyc = 0;
    @(negedge clk); start = 1'b0; x = '0; d = '0;
    while (!done) begin @(posedge clk); cyc++; @(negedge clk); end
    if (pexc != 0) n_exc++;
    checks += 3;
    if (cyc != 14) begin failures++; $display("latency %0d, expected 14", cyc); end
    if (q != to_bcd(qi)) begin
      failures++;
      $display("MISMATCH x=%h d=%h q=%h expected %h", xa, da, q, to_bcd(qi));
    end
    if (adj != 6'(-k + int'(carry))) begin
      failures++; $display("exp_adj %0d expected %0d (x=%h d=%h)", adj, -k + int'(carry), xa, da);
    end
  endtask

  function automatic logic [NDIG-1:0][3:0] with_prefix(input logic [11:0] p);
    logic [NDIG-1:0][3:0] r;
    r = rnd_norm();
    r[NDIG-1 -: 3] = p;
    return r;
  endfunction

  initial begin
    P15 = 1; for (int i = 0; i < 15; i++) P15 = P15 * 10;
    P16 = P15 * 10;
    x = '0; d = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // directed cases
    run(to_bcd(P15), to_bcd(P15));                      // 1/1
    run(to_bcd(P16 - 1), to_bcd(P15));                  // largest ratio
    run(to_bcd(P15), to_bcd(P16 - 1));                  // smallest ratio
    run(to_bcd(P16 - 2), to_bcd(P16 - 1));              // just below 1
    run(to_bcd(P15 * 3), to_bcd(P15 * 7));
    run(to_bcd(P15 * 8), to_bcd(P15 * 8 + 8 * P15 / 1000));    // remainder reaches -1
    run(to_bcd(P15 * 2 + 1), to_bcd(P15 * 2));          // tie, round down to even
    run(to_bcd(P15 * 2 + 3), to_bcd(P15 * 2));          // tie, round up to even
    run(to_bcd(P15 * 4 + 2), to_bcd(P15 * 4));          // tie
    for (int i = 0; i < 40; i++) begin : exc_divisors
      logic [11:0] pre [12] = '{12'h909, 12'h943, 12'h952, 12'h961, 12'h980, 12'h990,
                                12'h181, 12'h188, 12'h190, 12'h454, 12'h471, 12'h495};
      run(rnd_norm(), with_prefix(pre[i % 12]));
    end
    for (int i = 0; i < 40; i++) begin : odd_ties
      logic [NDIG-1:0][3:0] xa;
      xa = rnd_norm();
      xa[0] = 4'(2 * $urandom_range(4) + 1);
      if (xa[NDIG-1] < 2) xa[NDIG-1] = 4'd2;
      run(xa, to_bcd(P15 * 2));
    end
    for (int i = 0; i < 40; i++) begin : equal_ops
      logic [NDIG-1:0][3:0] a;
      a = rnd_norm();
      run(a, a);
    end
    for (int i = 0; i < NRAND; i++) run(rnd_norm(), rnd_norm());
    // every mechanism must have happened
    checks += 11;
    if (n_comp == 0)  begin failures++; $display("compensation never used"); end
    if (n_negq == 0)  begin failures++; $display("no negative quotient digit"); end
    if (n_lowc == 0)  begin failures++; $display("low carry never selected"); end
    if (n_dc == 0)    begin failures++; $display("don't-care case never seen"); end
    if (n_wrap == 0)  begin failures++; $display("remainder -1 case never seen"); end
    if (n_exc == 0)   begin failures++; $display("no exceptional parameter"); end
    if (n_shift == 0) begin failures++; $display("dividend never shifted"); end
    if (n_up == 0)    begin failures++; $display("never rounded up"); end
    if (n_tie == 0)   begin failures++; $display("no tie"); end
    if (n_rneg == 0)  begin failures++; $display("final remainder never negative"); end
    if (n_rzero == 0) begin failures++; $display("final remainder never zero"); end
    $display("events: wrap=%0d comp=%0d negq=%0d lowc=%0d dc=%0d exc=%0d shift=%0d up=%0d tie=%0d rneg=%0d rzero=%0d",
             n_wrap, n_comp, n_negq, n_lowc, n_dc, n_exc, n_shift, n_up, n_tie, n_rneg, n_rzero);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
