// booth_encoder: radix-4 modified Booth recoder for one digit.
// The triplet {x_i, x_i-1, x_i-2} = {b[2i+1], b[2i], b[2i-1]} selects a digit
// in {-2,-1,0,+1,+2}:
//   000 -> 0   001 -> +1  010 -> +1  011 -> +2
//   100 -> -2  101 -> -1  110 -> -1  111 -> 0
// The digit is given as one-hot magnitude (one, two) and a sign (neg). neg is
// kept low for 111 so that a zero digit always produces an all-zero partial
// product (design choice). Purely combinational.
module booth_encoder (
  input  logic [2:0] triplet,
  output logic       one,
  output logic       two,
  output logic       neg
);
  always_comb begin
    one = triplet[1] ^ triplet[0];
    two = (triplet == 3'b011) || (triplet == 3'b100);
    neg = triplet[2] && !(triplet[1] && triplet[0]);
  end
endmodule
