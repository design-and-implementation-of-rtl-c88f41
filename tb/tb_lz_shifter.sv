// Testbench of the leading-zero shifter: coefficients with 0..16 leading
// zero digits (16 = zero) are normalized; the count must equal the number of
// leading zeros and the output must equal the input times 10^count with a
// non-zero first digit (or zero for a zero input).
module tb_lz_shifter;
  import r100_pkg::*;
  logic [NDIG-1:0][3:0] a, y;
  logic [4:0] lz;
  logic clk = 1'b0;
  int checks = 0, failures = 0;
  lz_shifter dut (.a(a), .y(y), .lz(lz));
  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  function automatic logic [127:0] val(input logic [NDIG-1:0][3:0] v);
    logic [127:0] r = 0;
    for (int i = NDIG - 1; i >= 0; i--) r = r * 10 + 128'(v[i]);
    return r;
  endfunction
  initial begin
    int z;
    logic [127:0] p;
    for (int t = 0; t < 3400; t++) begin
      z = t % 17;
      for (int i = 0; i < NDIG; i++) a[i] = 4'($urandom_range(9));
      if (z < NDIG) a[NDIG-1-z] = 4'($urandom_range(9, 1));
      for (int i = 0; i < z; i++) a[NDIG-1-i] = 4'd0;
      #1;
      p = 1; for (int i = 0; i < z; i++) p = p * 10;
      checks++;
      if (int'(lz) != z || val(y) != val(a) * p || (z < NDIG && y[NDIG-1] == 0)) begin
        failures++; $display("a=%h -> y=%h lz=%0d (expected %0d)", a, y, lz, z);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
