// Testbench of the pre-scaling parameter table. All 600 indices
// 0.400..0.999 are applied. The parameter P is rebuilt from the outputs
// (MSD 1 or 2, two stored digits, their placement given by the exception
// code) and must satisfy the purpose of the table: every D_m with these
// three leading digits is scaled into [1, 1 + 1/99), i.e. P*idx >= 10^6 and
// 99*P*(idx+1) <= 10^8 with P in thousandths. The six exceptional indices
// must return their listed 4-digit parameters and all others exc = 0.
module tb_prescale_lut;
  logic [2:0][3:0] idx;
  logic [1:0][3:0] lsd2;
  logic msd2;
  logic [1:0] exc;
  logic clk = 1'b0;
  int checks = 0, failures = 0;
  prescale_lut dut (.idx(idx), .lsd2(lsd2), .msd2(msd2), .exc(exc));
  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  function automatic int listed(input int i);
    case (i)
      909: return 1105;
      943: return 1065;
      952: return 1055;
      961: return 1045;
      980: return 1025;
      990: return 1015;
      default: return 0;
    endcase
  endfunction
  initial begin
    longint pv;
    for (int i = 400; i < 1000; i++) begin
      idx = {4'(i / 100), 4'((i / 10) % 10), 4'(i % 10)};
      #1;
      pv = 1000 * (msd2 ? 2 : 1) + int'(lsd2[1]) * (exc[1] ? 10 : 100) + int'(lsd2[0]) * (exc[0] ? 1 : 10);
      checks += 2;
      if (pv * i < 1000000 || 99 * pv * (i + 1) > 100000000) begin
        failures++; $display("idx %0d: parameter %0d out of range", i, pv);
      end
      if (listed(i) != 0 ? (pv != listed(i)) : (exc != 2'b00)) begin
        failures++; $display("idx %0d: parameter %0d exc %b, listed %0d", i, pv, exc, listed(i));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
