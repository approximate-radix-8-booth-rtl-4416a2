// aaac_cu: combine unit of the array-based approximate arithmetic model. It
// adds the compensation from the ECU to the truncated result from the LPCU,
// modulo 2^N, giving the final N-bit fixed-width output. The operation is a
// plain carry-propagate addition (design choice; the model only says the two
// are combined). Purely combinational.
module aaac_cu #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0] lp,
  input  logic [N-1:0] comp,
  output logic [N-1:0] y
);
  assign y = lp + comp;
endmodule
