// tb_sq_pp_array: exhaustive over all 2^16 inputs. Checks that the N/2
// partial squaring rows add up to A*A (so no bit is lost when columns are
// stacked into rows), and that the weighted sums of the accurate part
// (columns N..2N-1) and of the top two truncated columns equal those of the
// plain triangular array of a_i*a_j terms, which the ECU and LPCU rely on.
// Combinational: one input per 1 ns.
module tb_sq_pp_array;
  import aaac_ref_pkg::*;
  localparam int N = 16;
  logic [N-1:0] a;
  logic [N/2-1:0][2*N-1:0] rows;
  int checks = 0, failures = 0;

  sq_pp_array #(.N(N)) dut (.a(a), .rows(rows));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned sum, win, hi, exp_sq;
    for (int v = 0; v < (1 << N); v++) begin
      a = N'(v);
      #1;
      sum = 0; win = 0; hi = 0;
      for (int r = 0; r < N/2; r++) begin
        sum += longint'(rows[r]);
        win += (longint'(rows[r]) >> (N-2)) & 3;
        hi  += longint'(rows[r]) >> N;
      end
      exp_sq = longint'(v) * longint'(v);
      checks++;
      if (sum != exp_sq || win != sq_window(longint'(v), N, N-2, N-1) ||
          hi != sq_window(longint'(v), N, N, 2*N-1)) begin
        failures++;
        if (failures < 10)
          $display("FAIL a=%h sum=%h expected %h win=%0d hi=%h", a, sum, exp_sq, win, hi);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
