// aaac_booth_mult: approximate fixed-width N x N signed radix-4 Booth
// multiplier. It returns N bits, an approximation of the upper half of the
// 2N-bit product rounded to nearest (what a post-truncated multiplier gives
// by adding a 1 in column N-1 of the full product).
// Structure (array-based approximate arithmetic model):
//   booth_pp_array  N/2 Booth partial products plus a row of negation bits
//   aaac_lpcu       adds the accurate part, columns N .. 2N-1
//   aaac_ecu        estimates the carry out of the truncated part from its
//                   top ECU_COLS columns and a bias
//   aaac_cu         adds the two
// With the default window of two columns and bias 4 the result is within
// 1 LSB of the rounded exact product. The radix-4 recoding, the split of
// the array at column N and the LPCU/ECU/CU structure follow the
// array-based approximate model; the ECU window and bias, the 3:2
// compressor tree and the sign-extension form are this design's choices.
// Purely combinational.
module aaac_booth_mult
  import aaac_pkg::*;
#(
  parameter int unsigned N        = WIDTH,
  parameter int unsigned ECU_COLS_P = ECU_COLS,
  parameter int unsigned ECU_BIAS   = MULT_ECU_BIAS
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] p
);
  localparam int unsigned ROWS = N / 2 + 1;

  logic [ROWS-1:0][2*N-1:0] rows;
  logic [N-1:0] lp, comp;

  booth_pp_array #(.N(N)) u_pp (.a(a), .b(b), .rows(rows));

  aaac_lpcu #(.N(N), .ROWS(ROWS)) u_lpcu (.rows(rows), .lp(lp));

  aaac_ecu #(.N(N), .ROWS(ROWS), .ECU_COLS(ECU_COLS_P), .ECU_BIAS(ECU_BIAS))
    u_ecu (.rows(rows), .comp(comp));

  aaac_cu #(.N(N)) u_cu (.lp(lp), .comp(comp), .y(p));
endmodule
