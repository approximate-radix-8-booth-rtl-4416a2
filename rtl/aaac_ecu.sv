// aaac_ecu: error compensation unit of the array-based approximate
// arithmetic model. It estimates the carry that the truncated part of the
// array (columns 0 .. N-1) would send into column N after rounding (a 1
// added in column N-1). Only the ECU_COLS most significant truncated columns
// are formed: their bits are summed with their weights inside that window,
// ECU_BIAS is added in units of column N-ECU_COLS (it stands for the rounding
// 1 and for the expected carry of the columns below, which are never formed)
// and the result is shifted down by ECU_COLS:
//   comp = (sum_r rows[r][N-1 : N-ECU_COLS] + ECU_BIAS) >> ECU_COLS
// The window and bias are this design's choice; they were set by error
// simulation over random operands. comp is N bits wide so that it adds
// directly to the LPCU result; with the default 9 rows, a 2-column window
// and bias 4 it never exceeds 7, so its upper bits are constant zero and
// synthesis removes them. Purely combinational.
module aaac_ecu #(
  parameter int unsigned N        = 16,
  parameter int unsigned ROWS     = 9,
  parameter int unsigned ECU_COLS = 2,
  parameter int unsigned ECU_BIAS = 4
) (
  input  logic [ROWS-1:0][2*N-1:0] rows,
  output logic [N-1:0]             comp
);
  localparam int unsigned SW = N + ECU_COLS;

  logic [SW-1:0] sum;

  always_comb begin
    sum = SW'(ECU_BIAS);
    for (int r = 0; r < ROWS; r++) sum = sum + SW'(rows[r][N-1 -: ECU_COLS]);
    comp = N'(sum >> ECU_COLS);
  end
endmodule
