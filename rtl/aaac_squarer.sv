// aaac_squarer: approximate fixed-width N-bit unsigned squarer. It returns N
// bits, an approximation of the upper half of the 2N-bit square rounded to
// nearest. The partial squaring array is built from AND terms of input bit
// pairs (no Booth recoding), N/2 rows high; the rest follows the same
// array-based approximate model as the multiplier:
//   sq_pp_array  N/2 partial squaring rows
//   aaac_lpcu    adds columns N .. 2N-1
//   aaac_ecu     top ECU_COLS truncated columns plus a bias
//   aaac_cu      adds the two
// With the default window of two columns and bias 3 the result is within
// 2 LSB of the rounded exact square. The AND-array with eight rows and the
// LPCU/ECU/CU structure follow the approximate model; the unsigned input,
// the folding that gives eight rows, the ECU window and bias are this
// design's choices. Purely combinational.
module aaac_squarer
  import aaac_pkg::*;
#(
  parameter int unsigned N          = WIDTH,
  parameter int unsigned ECU_COLS_P = ECU_COLS,
  parameter int unsigned ECU_BIAS   = SQ_ECU_BIAS
) (
  input  logic [N-1:0] a,
  output logic [N-1:0] p
);
  localparam int unsigned ROWS = N / 2;

  logic [ROWS-1:0][2*N-1:0] rows;
  logic [N-1:0] lp, comp;

  sq_pp_array #(.N(N)) u_pp (.a(a), .rows(rows));

  aaac_lpcu #(.N(N), .ROWS(ROWS)) u_lpcu (.rows(rows), .lp(lp));

  aaac_ecu #(.N(N), .ROWS(ROWS), .ECU_COLS(ECU_COLS_P), .ECU_BIAS(ECU_BIAS))
    u_ecu (.rows(rows), .comp(comp));

  aaac_cu #(.N(N)) u_cu (.lp(lp), .comp(comp), .y(p));
endmodule
