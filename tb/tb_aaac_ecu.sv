// tb_aaac_ecu: random rows, including all-ones rows. The expected
// compensation is ((sum over rows of the 2-bit window at columns N-2..N-1)
// + bias) / 4, the window taken with division and modulo. Combinational.
module tb_aaac_ecu;
  localparam int N = 16, ROWS = 9, K = 2, BIAS = 4;
  logic [ROWS-1:0][2*N-1:0] rows;
  logic [N-1:0] comp;
  int checks = 0, failures = 0;

  aaac_ecu #(.N(N), .ROWS(ROWS), .ECU_COLS(K), .ECU_BIAS(BIAS)) dut (.rows(rows), .comp(comp));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned win, exp_c;
    for (int k = 0; k < 5000; k++) begin
      win = 0;
      for (int r = 0; r < ROWS; r++) begin
        rows[r] = (k < 2) ? {2*N{k == 1}} : {$urandom, $urandom};
        win += (longint'(rows[r]) / (longint'(1) << (N-K))) % (longint'(1) << K);
      end
      #1;
      exp_c = (win + BIAS) / (longint'(1) << K);
      checks++;
      if (longint'(comp) != exp_c) begin
        failures++;
        $display("FAIL comp=%0d expected %0d", comp, exp_c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
