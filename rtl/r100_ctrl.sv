// Operation sequence controller of the radix-100 divider (Section 4.4 of the
// design). After 'start' (sampled at a clock edge, while idle) it steps
// through: cycle 1 pre-scale divisor, cycle 2 pre-scale dividend and add the
// divisor terms, cycle 3 add the dividend terms and make D' compact, cycle 4
// 3D' and +-110D', cycles 5..13 the nine iterations, cycle 14 rounding.
// 'done' is a one-cycle pulse in the cycle after cycle 14, when the result
// registers hold the quotient: 14 clock edges after the start edge.
// It also drives the pre-scaling module's input register and output capture.
module r100_ctrl
  import r100_pkg::*;
#(
  parameter int unsigned ITERS_P = ITERS
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  output mode_t mode,
  output logic  ps_load,       // load an operand into the pre-scaler
  output logic  ps_sel_dividend,
  output logic  ps_capture,
  output logic  busy,
  output logic  done
);
  logic [3:0] iter;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      mode <= M_IDLE;
      iter <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (mode)
        M_IDLE:  if (start) mode <= M_PS_D;
        M_PS_D:  mode <= M_PS_X;
        M_PS_X:  mode <= M_ADD_X;
        M_ADD_X: mode <= M_MUL3;
        M_MUL3:  begin mode <= M_ITER; iter <= '0; end
        M_ITER:  begin
          iter <= iter + 4'd1;
          if (iter == 4'(ITERS_P - 1)) mode <= M_ROUND;
        end
        M_ROUND: begin mode <= M_IDLE; done <= 1'b1; end
        default: mode <= M_IDLE;
      endcase
    end

  assign ps_load         = (mode == M_IDLE && start) || (mode == M_PS_D);
  assign ps_sel_dividend = (mode == M_PS_D);
  assign ps_capture      = (mode == M_PS_D) || (mode == M_PS_X);
  assign busy            = (mode != M_IDLE);
endmodule
