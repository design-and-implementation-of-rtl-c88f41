// Testbench of the divide-by-zero detector: the zero coefficient must be
// flagged, and every coefficient with a single non-zero digit anywhere, or
// random digits, must not.
module tb_div_zero_detect;
  import r100_pkg::*;
  logic [NDIG-1:0][3:0] d;
  logic dz;
  logic clk = 1'b0;
  int checks = 0, failures = 0;
  div_zero_detect dut (.d(d), .dz(dz));
  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    d = '0;
    #1; checks++;
    if (!dz) begin failures++; $display("zero not detected"); end
    for (int i = 0; i < NDIG; i++)
      for (int v = 1; v < 10; v++) begin
        d = '0; d[i] = 4'(v);
        #1; checks++;
        if (dz) begin failures++; $display("false zero for %h", d); end
      end
    for (int t = 0; t < 1000; t++) begin
      for (int i = 0; i < NDIG; i++) d[i] = 4'($urandom_range(9));
      #1; checks++;
      if (dz != (d == '0)) begin failures++; $display("wrong flag for %h", d); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
