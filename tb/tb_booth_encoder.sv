// tb_booth_encoder: checks the radix-4 Booth recoding for every 8-bit
// multiplier: the digits, weighted by 4^i, must add up to the signed
// multiplier value, and each digit must be one of -2..+2 with a single
// magnitude flag.
module tb_booth_encoder;
  int checks = 0, failures = 0;
  logic [7:0] y;
  logic [3:0] one, two, neg;

  booth_encoder #(.BW(8)) dut (.y(y), .one(one), .two(two), .neg(neg));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      int sum, d;
      y = 8'(v);
      #1;
      sum = 0;
      for (int i = 0; i < 4; i++) begin
        d = one[i] ? 1 : (two[i] ? 2 : 0);
        if (neg[i]) d = -d;
        sum += d * (4 ** i);
        checks++;
        if (one[i] && two[i]) begin
          failures++;
          $display("FAIL y=%0d digit %0d has both flags", v, i);
        end
      end
      checks++;
      if (sum != int'($signed(y))) begin
        failures++;
        $display("FAIL y=%0d recoded to %0d", $signed(y), sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
