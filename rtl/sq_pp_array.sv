// sq_pp_array: partial squaring array of an N-bit unsigned squarer (N even).
// A*A is the sum of a_i at column 2i and of a_i&a_j (i<j) at column i+j+1.
// In column 2m the pair a_m + a_(m-1)&a_m is rewritten as a_m&~a_(m-1) in
// column 2m plus a_m&a_(m-1) in column 2m+1, which leaves at most N/2 bits in
// any column. The bits of each column are then stacked from row 0 downward,
// giving the N/2 rows PS_0 .. PS_(N/2-1), each 2N bits wide; their sum is
// A*A. Every bit is a two-input AND (one input possibly inverted). The
// folding and stacking are this design's own arrangement of the array.
// Purely combinational.
module sq_pp_array #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0]                  a,
  output logic [N/2-1:0][2*N-1:0]       rows
);
  localparam int unsigned NR = N / 2;

  always_comb begin
    int unsigned h;
    rows = '0;
    for (int c = 0; c < 2*N; c++) begin
      h = 0;
      // diagonal term a_m (column 2m), merged with the pair (m-1, m)
      if (c % 2 == 0 && c / 2 < N) begin
        if (c == 0) rows[h][c] = a[0];
        else        rows[h][c] = a[c/2] & ~a[c/2-1];
        h++;
      end
      // the pair (m-1, m) moved up from column 2m to column 2m+1
      if (c % 2 == 1 && c / 2 >= 1 && c / 2 < N) begin
        rows[h][c] = a[c/2] & a[c/2-1];
        h++;
      end
      // remaining cross terms a_i & a_j, i < j-1, at column i+j+1
      for (int i = 0; i < N; i++) begin
        for (int j = i + 2; j < N; j++) begin
          if (i + j + 1 == c && h < NR) begin
            rows[h][c] = a[i] & a[j];
            h++;
          end
        end
      end
    end
  end
endmodule
