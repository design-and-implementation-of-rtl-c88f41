// Pre-scaling parameter look-up table (Sections 3.3.1 and 4.2 of the design).
// Index: the three most significant digits of D_m, 0.400 .. 0.999 (600 rows).
// Each row holds the two low digits of the 3-digit parameter P (scaled divisor
// D' = D_m * P / 100) and a 2-bit exception code; the parameter MSD (1 or 2)
// comes from the separate "first parameter digit detection" comparator.
// The rows are computed at elaboration from the range condition of the
// parameter: idx*P >= 10^5 and (idx+1)*P*99 < 10^7, which keeps D' inside
// [1, 1+1/99) for every divisor whose three MSDs are idx; the smallest such P
// is stored. The six divisors of the exception table take a 4-digit parameter
// 1.0xy or 1.x0y: exc = 2'b11 means both stored digits move one place down
// (1.0xy), exc = 2'b01 means only the last digit moves (1.x0y).
// Combinational.
module prescale_lut (
  input  logic [2:0][3:0] idx,     // D_m digits 10^-1, 10^-2, 10^-3 (idx[2] is 10^-1)
  output logic [1:0][3:0] lsd2,    // parameter digits: lsd2[1] middle, lsd2[0] last
  output logic            msd2,    // parameter MSD is 2 (else 1)
  output logic [1:0]      exc      // exception shift code
);
  localparam int unsigned ROWS = 600;
  typedef logic [ROWS-1:0][9:0] table_t;   // {exc[1:0], digit1, digit0}

  function automatic table_t build_table();
    table_t t;
    for (int r = 0; r < ROWS; r++) begin
      int i, p;
      i = r + 400;
      p = (100000 + i - 1) / i;                 // smallest P with i*P >= 10^5
      t[r] = {2'b00, 4'((p / 10) % 10), 4'(p % 10)};
      case (i)                                  // exception table entries
        909: t[r] = {2'b01, 4'd1, 4'd5};        // 1.105
        943: t[r] = {2'b11, 4'd6, 4'd5};        // 1.065
        952: t[r] = {2'b11, 4'd5, 4'd5};        // 1.055
        961: t[r] = {2'b11, 4'd4, 4'd5};        // 1.045
        980: t[r] = {2'b11, 4'd2, 4'd5};        // 1.025
        990: t[r] = {2'b11, 4'd1, 4'd5};        // 1.015
        default: ;
      endcase
    end
    return t;
  endfunction

  localparam table_t TABLE = build_table();

  logic [9:0] ibin;
  logic [9:0] row;
  always_comb begin
    ibin = 10'(idx[2]) * 10'd100 + 10'(idx[1]) * 10'd10 + 10'(idx[0]);
    row  = (ibin >= 10'd400) ? TABLE[ibin - 10'd400] : '0;
    lsd2 = {row[7:4], row[3:0]};
    exc  = row[9:8];
    // First parameter digit detection: P >= 200 exactly for D_m < 0.503.
    msd2 = (ibin <= 10'd502);
  end
endmodule
