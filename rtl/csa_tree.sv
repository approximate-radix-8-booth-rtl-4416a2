// csa_tree: Wallace-style carry-save compressor tree. It reduces ROWS W-bit
// words to two (sum and carry) whose total equals the total of the inputs
// modulo 2^W. At each level the rows are taken in groups of three, each
// group goes through a csa32 (3:2 compressor), and the one or two rows left
// over pass down unchanged, so r rows become 2*floor(r/3) + r mod 3. A
// 9-row array takes four levels (9, 6, 4, 3, 2). The carry-propagate
// addition of the two outputs is left to the user of the tree. The level
// schedule is worked out at elaboration. Purely combinational.
module csa_tree #(
  parameter int unsigned W    = 16,
  parameter int unsigned ROWS = 9
) (
  input  logic [ROWS-1:0][W-1:0] rows,
  output logic [W-1:0]           sum,
  output logic [W-1:0]           carry
);
  // rows left after lvl levels of 3:2 reduction
  function automatic int unsigned rows_at(int unsigned r0, int unsigned lvl);
    int unsigned r;
    r = r0;
    for (int unsigned i = 0; i < lvl; i++)
      if (r > 2) r = 2 * (r / 3) + r % 3;
    return r;
  endfunction

  function automatic int unsigned num_levels(int unsigned r0);
    int unsigned n;
    n = 0;
    for (int unsigned i = 0; i < 64; i++)
      if (rows_at(r0, i) > 2) n = i + 1;
    return n;
  endfunction

  localparam int unsigned LEVELS = num_levels(ROWS);
  localparam int unsigned SLOTS  = (ROWS > 2) ? ROWS : 2;

  logic [W-1:0] in_rows [SLOTS];

  for (genvar k = 0; k < SLOTS; k++) begin : g_in
    if (k < ROWS) begin : g_row
      assign in_rows[k] = rows[k];
    end else begin : g_pad
      assign in_rows[k] = '0;
    end
  end

  // one block per level; each reads the rows of the level above
  for (genvar l = 0; l < LEVELS; l++) begin : g_lvl
    localparam int unsigned RI = rows_at(ROWS, l);
    localparam int unsigned G  = RI / 3;
    localparam int unsigned RO = 2 * G + RI % 3;
    logic [W-1:0] lin  [SLOTS];
    logic [W-1:0] lout [SLOTS];
    if (l == 0) begin : g_first
      assign lin = in_rows;
    end else begin : g_next
      assign lin = g_lvl[l-1].lout;
    end
    for (genvar g = 0; g < G; g++) begin : g_csa
      csa32 #(.W(W)) u_csa (
        .x (lin[3*g]),
        .y (lin[3*g+1]),
        .z (lin[3*g+2]),
        .s (lout[2*g]),
        .c (lout[2*g+1])
      );
    end
    for (genvar k = 0; k < RI % 3; k++) begin : g_pass
      assign lout[2*G+k] = lin[3*G+k];
    end
    for (genvar k = RO; k < SLOTS; k++) begin : g_zero
      assign lout[k] = '0;
    end
  end

  if (LEVELS == 0) begin : g_direct
    assign sum   = in_rows[0];
    assign carry = in_rows[1];
  end else begin : g_out
    assign sum   = g_lvl[LEVELS-1].lout[0];
    assign carry = g_lvl[LEVELS-1].lout[1];
  end
endmodule
