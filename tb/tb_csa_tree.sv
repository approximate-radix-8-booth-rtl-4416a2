// tb_csa_tree: the compressor tree at several heights (1, 2, 3, 8, 9 and 17
// rows, covering no level, one level and several levels with pass-through
// rows). For random rows, sum + carry must equal the total of the rows
// modulo 2^W. Combinational.
module tb_csa_tree;
  localparam int W = 16;
  localparam int NH = 6;
  localparam int HEIGHTS [NH] = '{1, 2, 3, 8, 9, 17};
  logic [16:0][W-1:0] rows;
  logic [W-1:0] sum [NH];
  logic [W-1:0] carry [NH];
  int checks = 0, failures = 0;

  for (genvar h = 0; h < NH; h++) begin : g_dut
    csa_tree #(.W(W), .ROWS(HEIGHTS[h])) dut (
      .rows  (rows[HEIGHTS[h]-1:0]),
      .sum   (sum[h]),
      .carry (carry[h])
    );
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned tot;
    for (int k = 0; k < 3000; k++) begin
      for (int r = 0; r < 17; r++) rows[r] = (k == 0) ? '1 : W'($urandom);
      #1;
      for (int h = 0; h < NH; h++) begin
        tot = 0;
        for (int r = 0; r < HEIGHTS[h]; r++) tot += int'(rows[r]);
        tot = tot % (1 << W);
        checks++;
        if ((int'(sum[h]) + int'(carry[h])) % (1 << W) != tot) begin
          failures++;
          if (failures < 10)
            $display("FAIL height %0d sum=%h carry=%h expected total %h", HEIGHTS[h], sum[h], carry[h], tot);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
