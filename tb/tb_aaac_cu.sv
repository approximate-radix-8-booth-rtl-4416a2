// tb_aaac_cu: random and wrap-around operands; the combine unit must return
// (lp + comp) modulo 2^N. Combinational: one step per 1 ns.
module tb_aaac_cu;
  localparam int N = 16;
  logic [N-1:0] lp, comp, y;
  int checks = 0, failures = 0;

  aaac_cu #(.N(N)) dut (.lp(lp), .comp(comp), .y(y));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned e;
    for (int k = 0; k < 5000; k++) begin
      lp   = (k == 0) ? '1 : N'($urandom);
      comp = (k == 0) ? 1  : N'($urandom % 16);
      #1;
      e = (int'(lp) + int'(comp)) % (1 << N);
      checks++;
      if (int'(y) != e) begin
        failures++;
        $display("FAIL lp=%h comp=%h y=%h expected %h", lp, comp, y, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
