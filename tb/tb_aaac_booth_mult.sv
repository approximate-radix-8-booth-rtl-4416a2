// tb_aaac_booth_mult: the fixed-width signed Booth multiplier against
// (1) the bit-exact model of the approximation built from the arithmetic
// definition of the Booth rows, and (2) the rounded exact product: the
// error must stay within 1 LSB, and the mean absolute error is reported.
// Corner operands plus 20000 random pairs. Combinational.
module tb_aaac_booth_mult;
  import aaac_ref_pkg::*;
  localparam int N = 16, K = 2, BIAS = 4;
  logic [N-1:0] a, b, p;
  int checks = 0, failures = 0;
  longint signed abs_err_sum = 0;
  int n_ops = 0;

  aaac_booth_mult dut (.a(a), .b(b), .p(p));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_ab(logic [N-1:0] av, logic [N-1:0] bv);
    longint unsigned exp_p, exact;
    longint signed err;
    a = av;
    b = bv;
    #1;
    exp_p = mult_model(longint'(av), longint'(bv), N, K, BIAS);
    exact = round_hi(longint'(sext(longint'(av), N) * sext(longint'(bv), N)) & 64'hffff_ffff, N);
    err   = wrap_diff(longint'(p), exact, N);
    abs_err_sum += (err < 0) ? -err : err;
    n_ops++;
    checks++;
    if (longint'(p) != exp_p || err > 1 || err < -1) begin
      failures++;
      if (failures < 10)
        $display("FAIL a=%h b=%h p=%h model %h rounded exact %h", av, bv, p, exp_p, exact);
    end
  endtask

  initial begin
    logic [N-1:0] corners [6] = '{16'h0000, 16'h0001, 16'h7fff, 16'h8000, 16'hffff, 16'h5555};
    foreach (corners[i]) foreach (corners[j]) check_ab(corners[i], corners[j]);
    for (int k = 0; k < 20000; k++) check_ab(N'($urandom), N'($urandom));
    $display("mean absolute error = %0d/%0d LSB", abs_err_sum, n_ops);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
