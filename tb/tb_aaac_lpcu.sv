// tb_aaac_lpcu: random partial product rows. The expected low-precision
// output is computed as (sum of the whole rows - sum of their low halves)
// / 2^N modulo 2^N in 64-bit arithmetic. Combinational: one step per 1 ns.
module tb_aaac_lpcu;
  localparam int N = 16, ROWS = 9;
  logic [ROWS-1:0][2*N-1:0] rows;
  logic [N-1:0] lp;
  int checks = 0, failures = 0;

  aaac_lpcu #(.N(N), .ROWS(ROWS)) dut (.rows(rows), .lp(lp));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned full, low, exp_lp;
    for (int k = 0; k < 5000; k++) begin
      full = 0; low = 0;
      for (int r = 0; r < ROWS; r++) begin
        rows[r] = (k == 0) ? '1 : {$urandom, $urandom} >> (k % 3);
        full += longint'(rows[r]);
        low  += longint'(rows[r]) % (longint'(1) << N);
      end
      #1;
      exp_lp = ((full - low) >> N) % (longint'(1) << N);
      checks++;
      if (longint'(lp) != exp_lp) begin
        failures++;
        $display("FAIL lp=%h expected %h", lp, exp_lp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
