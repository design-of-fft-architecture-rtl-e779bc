// tb_booth_pp_gen: for random 8-bit multiplicands and each Booth digit
// (-2, -1, 0, +1, +2) the row plus its negation bit must equal digit * m
// as a 9-bit two's-complement number.
module tb_booth_pp_gen;
  int checks = 0, failures = 0;
  logic [7:0] m;
  logic one, two, neg;
  logic [8:0] row;

  booth_pp_gen #(.AW(8)) dut (.m(m), .one(one), .two(two), .neg(neg), .row(row));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 600; i++) begin
      int d, exp, got;
      m = (i < 256) ? 8'(i) : 8'($urandom);
      d = int'($urandom_range(4, 0)) - 2;
      one = (d == 1 || d == -1);
      two = (d == 2 || d == -2);
      neg = (d < 0);
      #1;
      exp = d * int'($signed(m));
      got = int'($signed(row + 9'(neg)));
      checks++;
      if (got != exp) begin
        failures++;
        $display("FAIL m=%0d digit=%0d got %0d exp %0d", $signed(m), d, got, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
