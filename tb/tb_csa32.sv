// tb_csa32: random and all-ones words; the 3:2 compressor must satisfy
// s + c = x + y + z modulo 2^W and s = x ^ y ^ z. Combinational.
module tb_csa32;
  localparam int W = 16;
  logic [W-1:0] x, y, z, s, c;
  int checks = 0, failures = 0;

  csa32 #(.W(W)) dut (.x(x), .y(y), .z(z), .s(s), .c(c));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned tot;
    for (int k = 0; k < 5000; k++) begin
      x = (k == 0) ? '1 : W'($urandom);
      y = (k == 0) ? '1 : W'($urandom);
      z = (k == 0) ? '1 : W'($urandom);
      #1;
      tot = (int'(x) + int'(y) + int'(z)) % (1 << W);
      checks++;
      if ((int'(s) + int'(c)) % (1 << W) != tot || s != (x ^ y ^ z)) begin
        failures++;
        $display("FAIL x=%h y=%h z=%h s=%h c=%h", x, y, z, s, c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
