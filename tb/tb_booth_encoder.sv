// tb_booth_encoder: exhaustive check of the radix-4 Booth recoder. For each of
// the eight triplets the digit -2*x_i + x_i-1 + x_i-2 is worked out
// arithmetically and compared with the decoded (one, two, neg) outputs; a
// zero digit must leave all three low. Combinational: one step per 1 ns.
module tb_booth_encoder;
  logic [2:0] triplet;
  logic one, two, neg;
  int checks = 0, failures = 0;

  booth_encoder dut (.triplet(triplet), .one(one), .two(two), .neg(neg));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int d, got;
    for (int t = 0; t < 8; t++) begin
      triplet = 3'(t);
      #1;
      d   = -2*((t >> 2) & 1) + ((t >> 1) & 1) + (t & 1);
      got = (one ? 1 : 0) + (two ? 2 : 0);
      if (neg) got = -got;
      checks++;
      if (got != d || (one && two) || (d == 0 && (one || two || neg))) begin
        failures++;
        $display("FAIL triplet=%b one=%b two=%b neg=%b expected digit %0d", triplet, one, two, neg, d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
