// tb_aaac_squarer: exhaustive over all 2^16 unsigned inputs. Each output is
// compared with the bit-exact model of the approximation (column sums of the
// plain triangular squaring array) and with the rounded exact square: the
// error must stay within 2 LSB. The mean absolute error is reported.
module tb_aaac_squarer;
  import aaac_ref_pkg::*;
  localparam int N = 16, K = 2, BIAS = 3;
  logic [N-1:0] a, p;
  int checks = 0, failures = 0;
  longint signed abs_err_sum = 0;

  aaac_squarer dut (.a(a), .p(p));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned exp_p, exact;
    longint signed err;
    for (int v = 0; v < (1 << N); v++) begin
      a = N'(v);
      #1;
      exp_p = sq_model(longint'(v), N, K, BIAS);
      exact = round_hi(longint'(v) * longint'(v), N);
      err   = wrap_diff(longint'(p), exact, N);
      abs_err_sum += (err < 0) ? -err : err;
      checks++;
      if (longint'(p) != exp_p || err > 2 || err < -2) begin
        failures++;
        if (failures < 10)
          $display("FAIL a=%h p=%h model %h rounded exact %h", a, p, exp_p, exact);
      end
    end
    $display("mean absolute error = %0d/%0d LSB", abs_err_sum, 1 << N);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
