// booth_selector: partial product selection for one radix-4 Booth row.
// From the signed multiplicand A and the encoded digit (one, two, neg) it
// forms the N+1 bit word pp = +-{0, A, 2A}, negative values in ones
// complement: the +1 that completes the two's complement (the negation bit
// n_i) is added separately, in the truncation part of the array. N+1 bits
// are kept so that 2A is exact. Purely combinational.
module booth_selector #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0] a,
  input  logic         one,
  input  logic         two,
  input  logic         neg,
  output logic [N:0]   pp
);
  logic [N:0] a_ext;   // A sign-extended to N+1 bits
  logic [N:0] a_dbl;   // 2A
  logic [N:0] mag;

  always_comb begin
    a_ext = {a[N-1], a};
    a_dbl = {a, 1'b0};
    mag   = ({(N+1){one}} & a_ext) | ({(N+1){two}} & a_dbl);
    pp    = mag ^ {(N+1){neg}};
  end
endmodule
