// tb_booth_selector: drives the selector with every legal digit (0, +-1, +-2)
// and random plus corner multiplicands, and checks the (N+1)-bit word against
// digit*A - [digit<0] computed in 64-bit integers (ones complement of the
// magnitude). Combinational: one step per 1 ns.
module tb_booth_selector;
  import aaac_ref_pkg::*;
  localparam int N = 16;
  logic [N-1:0] a;
  logic one, two, neg;
  logic [N:0] pp;
  int checks = 0, failures = 0;

  booth_selector #(.N(N)) dut (.a(a), .one(one), .two(two), .neg(neg), .pp(pp));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(logic [N-1:0] av, int d);
    longint signed v;
    longint unsigned exp_pp;
    a   = av;
    one = (d == 1 || d == -1);
    two = (d == 2 || d == -2);
    neg = (d < 0);
    #1;
    v = longint'(d) * sext(longint'(av), N);
    if (d < 0) v = v - 1;
    exp_pp = longint'(v) & ((longint'(1) << (N+1)) - 1);
    checks++;
    if (longint'(pp) != exp_pp) begin
      failures++;
      $display("FAIL a=%h d=%0d pp=%h expected %h", av, d, pp, exp_pp);
    end
  endtask

  initial begin
    logic [N-1:0] corners [5] = '{16'h0000, 16'h0001, 16'h7fff, 16'h8000, 16'hffff};
    for (int c = 0; c < 5; c++)
      for (int d = -2; d <= 2; d++) check_one(corners[c], d);
    for (int k = 0; k < 2000; k++)
      for (int d = -2; d <= 2; d++) check_one(N'($urandom), d);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
