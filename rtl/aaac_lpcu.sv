// aaac_lpcu: low-precision computing unit of the array-based approximate
// arithmetic model. It adds only the accurate part of a partial product
// array, columns N .. 2N-1, and never looks at the truncated part (columns
// 0 .. N-1): on its own it is a direct-truncated fixed-width result. The
// upper halves of the ROWS input rows go through a carry-save compressor
// tree (csa_tree, 3:2 compressors) down to two words, which a
// carry-propagate adder sums modulo 2^N. The compressor tree and the final
// adder follow the usual fast multiplier structure; the choice of 3:2
// compressors is this design's. Purely combinational.
module aaac_lpcu #(
  parameter int unsigned N    = 16,
  parameter int unsigned ROWS = 9
) (
  input  logic [ROWS-1:0][2*N-1:0] rows,
  output logic [N-1:0]             lp
);
  logic [ROWS-1:0][N-1:0] ap;   // accurate-part halves of the rows
  logic [N-1:0] cs_sum, cs_carry;

  always_comb begin
    for (int r = 0; r < ROWS; r++) ap[r] = rows[r][2*N-1:N];
  end

  csa_tree #(.W(N), .ROWS(ROWS)) u_tree (.rows(ap), .sum(cs_sum), .carry(cs_carry));

  assign lp = cs_sum + cs_carry;
endmodule
