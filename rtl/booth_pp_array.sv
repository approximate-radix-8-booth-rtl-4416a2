// booth_pp_array: radix-4 Booth partial product array of an N x N signed
// multiplier (N even).
// Row i (i = 0 .. N/2-1) is PP_i = digit_i * A in ones complement, shifted to
// column 2i and sign-extended to 2N bits. Row N/2 collects the negation bits:
// bit 2i is n_i, the +1 that turns the ones complement of row i into its
// two's complement. The sum of all rows modulo 2^2N is A*B. Sign extension is
// carried as replicated sign bits (a design choice); the bits below column N,
// the truncated part of a fixed-width multiplier, are the same as with the
// usual inverted-sign encoding. Purely combinational.
module booth_pp_array #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0]                 a,
  input  logic [N-1:0]                 b,
  output logic [N/2:0][2*N-1:0]        rows
);
  localparam int unsigned NPP = N / 2;

  logic [N:0]   b_pad;   // {b, 0}: supplies b[-1] = 0
  logic [NPP-1:0] one, two, neg;
  logic [NPP-1:0][N:0] pp;

  assign b_pad = {b, 1'b0};

  for (genvar i = 0; i < NPP; i++) begin : g_row
    booth_encoder u_enc (
      .triplet (b_pad[2*i+2 -: 3]),
      .one     (one[i]),
      .two     (two[i]),
      .neg     (neg[i])
    );
    booth_selector #(.N(N)) u_sel (
      .a   (a),
      .one (one[i]),
      .two (two[i]),
      .neg (neg[i]),
      .pp  (pp[i])
    );
  end

  always_comb begin
    rows[NPP] = '0;
    for (int i = 0; i < NPP; i++) begin
      rows[i]          = (2*N)'($signed(pp[i])) << (2*i);
      rows[NPP][2*i]   = neg[i];
    end
  end
endmodule
