// aaac_pkg: constants shared by the approximate fixed-width multiplier and
// squarer. WIDTH is the operand and result width (16 in the reference
// design). The ECU constants were chosen for this design by minimising the
// mean absolute error of the rounded fixed-width result over random operands:
// the ECU forms the two most significant truncated columns exactly and adds a
// bias, expressed in units of the lower of those two columns.
package aaac_pkg;
  localparam int unsigned WIDTH         = 16;
  localparam int unsigned ECU_COLS      = 2;
  localparam int unsigned MULT_ECU_BIAS = 4;
  localparam int unsigned SQ_ECU_BIAS   = 3;
endpackage
