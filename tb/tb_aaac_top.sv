// tb_aaac_top: end-to-end test of both units at the default width, with no
// parameter overrides. The multiplier and the squarer run at the same time
// on independent random operands; each output is checked against its
// bit-exact model and against the rounded exact result (1 LSB bound for
// the multiplier, 2 LSB for the squarer). It also counts how often each
// mechanism of the design was exercised and fails if one never was:
// every Booth digit value -2..+2, negative operands, a nonzero error
// compensation, a compensation carry that changes the output relative to
// plain truncation, and an output that differs from the rounded exact
// result (the approximation itself). Combinational.
module tb_aaac_top;
  import aaac_ref_pkg::*;
  localparam int N = 16;
  logic [N-1:0] mul_a, mul_b, mul_p, sq_a, sq_p;
  int checks = 0, failures = 0;
  int digit_seen [5];
  int n_neg = 0, n_comp = 0, n_sq_comp = 0, n_approx = 0;

  aaac_top dut (.mul_a(mul_a), .mul_b(mul_b), .mul_p(mul_p), .sq_a(sq_a), .sq_p(sq_p));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(logic [N-1:0] av, logic [N-1:0] bv, logic [N-1:0] sv);
    longint unsigned m_exp, m_exact, m_trunc, s_exp, s_exact, s_trunc;
    longint signed m_err, s_err;
    mul_a = av;
    mul_b = bv;
    sq_a  = sv;
    #1;
    m_exp   = mult_model(longint'(av), longint'(bv), N, 2, 4);
    m_trunc = mult_trunc(longint'(av), longint'(bv), N);
    m_exact = round_hi(longint'(sext(longint'(av), N) * sext(longint'(bv), N)) & 64'hffff_ffff, N);
    m_err   = wrap_diff(longint'(mul_p), m_exact, N);
    s_exp   = sq_model(longint'(sv), N, 2, 3);
    s_trunc = sq_window(longint'(sv), N, N, 2*N-1) & 64'hffff;
    s_exact = round_hi(longint'(sv) * longint'(sv), N);
    s_err   = wrap_diff(longint'(sq_p), s_exact, N);
    for (int i = 0; i < N/2; i++) digit_seen[booth_digit(longint'(bv), i) + 2]++;
    if (av[N-1] || bv[N-1]) n_neg++;
    if (longint'(mul_p) != m_trunc) n_comp++;
    if (longint'(sq_p) != s_trunc) n_sq_comp++;
    if (m_err != 0 || s_err != 0) n_approx++;
    checks += 2;
    if (longint'(mul_p) != m_exp || m_err > 1 || m_err < -1) begin
      failures++;
      if (failures < 10) $display("FAIL mult a=%h b=%h p=%h model %h exact %h", av, bv, mul_p, m_exp, m_exact);
    end
    if (longint'(sq_p) != s_exp || s_err > 2 || s_err < -2) begin
      failures++;
      if (failures < 10) $display("FAIL sq a=%h p=%h model %h exact %h", sv, sq_p, s_exp, s_exact);
    end
  endtask

  initial begin
    for (int k = 0; k < 20000; k++) step(N'($urandom), N'($urandom), N'($urandom));
    step(16'h8000, 16'h8000, 16'hffff);
    $display("digits -2:%0d -1:%0d 0:%0d +1:%0d +2:%0d", digit_seen[0], digit_seen[1],
             digit_seen[2], digit_seen[3], digit_seen[4]);
    $display("negative operands:%0d mult compensation used:%0d squarer compensation used:%0d approximate outputs:%0d",
             n_neg, n_comp, n_sq_comp, n_approx);
    foreach (digit_seen[i]) begin
      checks++;
      if (digit_seen[i] == 0) begin failures++; $display("FAIL Booth digit %0d never seen", i - 2); end
    end
    checks += 4;
    if (n_neg == 0)     begin failures++; $display("FAIL no negative operand"); end
    if (n_comp == 0)    begin failures++; $display("FAIL multiplier compensation never used"); end
    if (n_sq_comp == 0) begin failures++; $display("FAIL squarer compensation never used"); end
    if (n_approx == 0)  begin failures++; $display("FAIL no approximate output seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
