// Testbench of the carry transformation: two 1-bit carry vectors of equal
// weight are merged into one 2-bit carry per digit; every position of every
// input combination is checked against ca + cb.
module tb_carry_combine;
  localparam int W = 23;
  logic [W-1:0] ca, cb;
  logic [W-1:0][1:0] c2;
  logic clk = 1'b0;
  int checks = 0, failures = 0;
  carry_combine #(.W(W)) dut (.ca(ca), .cb(cb), .c2(c2));
  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int t = 0; t < 1000; t++) begin
      ca = W'($urandom); cb = W'($urandom);
      if (t == 0) begin ca = '1; cb = '1; end
      #1;
      for (int i = 0; i < W; i++) begin
        checks++;
        if (int'(c2[i]) != int'(ca[i]) + int'(cb[i])) begin failures++; $display("position %0d wrong", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
