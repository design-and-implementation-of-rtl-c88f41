// Testbench of the operation sequence controller: after each start the mode
// must step through divisor pre-scaling, dividend pre-scaling, dividend
// addition, 3D' computation, nine iterations and rounding, one per cycle;
// done must pulse once, 14 clock edges after the start edge; busy must be
// high exactly while a division runs; start while busy must be ignored; the
// pre-scaler controls must follow the mode. Gaps between operations are
// random.
module tb_r100_ctrl;
  import r100_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  mode_t mode;
  logic ps_load, ps_sel, ps_cap, busy, done;
  int checks = 0, failures = 0;
  r100_ctrl dut (.clk(clk), .rst_n(rst_n), .start(start), .mode(mode), .ps_load(ps_load),
                 .ps_sel_dividend(ps_sel), .ps_capture(ps_cap), .busy(busy), .done(done));
  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  mode_t expected [14];
  initial begin
    expected[0] = M_PS_D; expected[1] = M_PS_X; expected[2] = M_ADD_X; expected[3] = M_MUL3;
    for (int i = 4; i < 13; i++) expected[i] = M_ITER;
    expected[13] = M_ROUND;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 300; t++) begin
      repeat ($urandom_range(3)) begin
        @(negedge clk);
        checks++;
        if (mode != M_IDLE || busy || done || ps_cap) begin failures++; $display("not idle"); end
      end
      start = 1'b1;
      #1;
      checks++;
      if (!ps_load || ps_sel) begin failures++; $display("divisor load missing"); end
      @(negedge clk);
      for (int c = 0; c < 14; c++) begin
        start = 1'($urandom);                     // must be ignored while busy
        checks++;
        if (mode != expected[c] || !busy || done) begin
          failures++; $display("cycle %0d: mode %0d busy %b done %b", c + 1, mode, busy, done);
        end
        if (ps_cap != (c < 2) || ps_sel != (c == 0) || ps_load != (c == 0)) begin
          failures++; $display("cycle %0d: pre-scaler controls wrong", c + 1);
        end
        @(negedge clk);
      end
      start = 1'b0;
      checks++;
      if (!done || busy) begin failures++; $display("done missing after 14 edges"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
