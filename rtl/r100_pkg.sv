// Shared types and constants of the radix-100 decimal divider.
//
// Digit vectors are packed arrays of BCD digits, index 0 being the least
// significant digit. The iteration datapath is W digits wide: digit W-1 is the
// sign digit (weight 10^0, 0 = plus, 9 = minus in 10's complement) and digit i
// has weight 10^(i-W+1). The pre-scaling datapath is PW digits wide with digit
// PW-1 of weight 10^1 and digit 0 of weight 10^-21. The 16-digit coefficients,
// the 18-digit quotient and the 14-cycle schedule follow the document; the
// widths W, PW and MW are one or two digits wider than its figures so that all
// scaled values stay exact (see README).
package r100_pkg;
  localparam int unsigned NDIG  = 16;   // decimal64 coefficient digits
  localparam int unsigned QDIG  = 18;   // quotient digits produced (9 iterations)
  localparam int unsigned ITERS = 9;    // radix-100 iterations
  localparam int unsigned W     = 23;   // iteration width (sign digit + 22 fraction digits)
  localparam int unsigned PW    = 23;   // pre-scaling width (10^1 .. 10^-21)
  localparam int unsigned MW    = 20;   // width of the multiples of D_m (10^1 .. 10^-18)

  typedef logic [3:0] bcd_t;

  // Task of the current cycle, driven by the controller (Section 4.4).
  typedef enum logic [2:0] {
    M_IDLE   = 3'd0,
    M_PS_D   = 3'd1,  // cycle 1: pre-scale the divisor
    M_PS_X   = 3'd2,  // cycle 2: pre-scale dividend, add divisor terms
    M_ADD_X  = 3'd3,  // cycle 3: add dividend terms (R0), compact D', 1/2/4/5/-1 D'
    M_MUL3   = 3'd4,  // cycle 4: 3D' in the DCPA, +-110D' in the DCSAs
    M_ITER   = 3'd5,  // cycles 5..13: radix-100 iterations
    M_ROUND  = 3'd6   // cycle 14: compact remainder, round
  } mode_t;
endpackage
