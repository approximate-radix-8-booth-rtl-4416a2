// csa32: word-level 3:2 compressor (carry-save adder). W full adders side by
// side reduce three W-bit words to a sum word and a carry word with
// x + y + z = s + c (mod 2^W): s is the bitwise XOR, c the bitwise majority
// shifted up one column; the carry out of the top column is dropped, since
// every sum in this design is taken modulo 2^W. Purely combinational, one
// full-adder delay.
module csa32 #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [W-1:0] z,
  output logic [W-1:0] s,
  output logic [W-1:0] c
);
  logic [W-2:0] maj;   // majority of the columns whose carry is kept

  always_comb begin
    s   = x ^ y ^ z;
    maj = (x[W-2:0] & y[W-2:0]) | (x[W-2:0] & z[W-2:0]) | (y[W-2:0] & z[W-2:0]);
    c   = {maj, 1'b0};
  end
endmodule
