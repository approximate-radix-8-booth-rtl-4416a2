// tb_booth_pp_array: checks every row of the radix-4 Booth array against the
// arithmetic definition (digit_i*A in ones complement times 4^i, and the
// negation-bit row), and that the rows add up to A*B modulo 2^2N. Corner
// and random signed operands. Combinational: one step per 1 ns.
module tb_booth_pp_array;
  import aaac_ref_pkg::*;
  localparam int N = 16;
  logic [N-1:0] a, b;
  logic [N/2:0][2*N-1:0] rows;
  int checks = 0, failures = 0;

  booth_pp_array #(.N(N)) dut (.a(a), .b(b), .rows(rows));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_ab(logic [N-1:0] av, logic [N-1:0] bv);
    longint unsigned sum, exp_row, exp_prod;
    a = av;
    b = bv;
    #1;
    sum = 0;
    for (int i = 0; i <= N/2; i++) begin
      exp_row = (i < N/2) ? booth_row(longint'(av), longint'(bv), i, N)
                          : booth_neg_row(longint'(bv), N);
      sum += longint'(rows[i]);
      checks++;
      if (longint'(rows[i]) != exp_row) begin
        failures++;
        $display("FAIL a=%h b=%h row %0d = %h expected %h", av, bv, i, rows[i], exp_row);
      end
    end
    exp_prod = longint'(sext(longint'(av), N) * sext(longint'(bv), N)) & 64'hffff_ffff;
    checks++;
    if ((sum & 64'hffff_ffff) != exp_prod) begin
      failures++;
      $display("FAIL a=%h b=%h row sum %h expected product %h", av, bv, sum & 64'hffff_ffff, exp_prod);
    end
  endtask

  initial begin
    logic [N-1:0] corners [6] = '{16'h0000, 16'h0001, 16'h7fff, 16'h8000, 16'hffff, 16'haaaa};
    foreach (corners[i]) foreach (corners[j]) check_ab(corners[i], corners[j]);
    for (int k = 0; k < 5000; k++) check_ab(N'($urandom), N'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
