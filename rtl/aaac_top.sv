// aaac_top: the two approximate fixed-width arithmetic units side by side,
// each with its own ports: a signed N x N radix-4 Booth multiplier and an
// unsigned N-bit squarer, both returning the N most significant bits of the
// exact result, rounded and approximated by truncation plus error
// compensation. Both are purely combinational; there is no clock, which is
// this design's choice (no pipelining is specified for these units).
module aaac_top
  import aaac_pkg::*;
#(
  parameter int unsigned N = WIDTH
) (
  input  logic [N-1:0] mul_a,
  input  logic [N-1:0] mul_b,
  output logic [N-1:0] mul_p,
  input  logic [N-1:0] sq_a,
  output logic [N-1:0] sq_p
);
  aaac_booth_mult #(.N(N)) u_mult (.a(mul_a), .b(mul_b), .p(mul_p));

  aaac_squarer #(.N(N)) u_sq (.a(sq_a), .p(sq_p));
endmodule
