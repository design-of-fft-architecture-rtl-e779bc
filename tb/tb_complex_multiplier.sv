// tb_complex_multiplier: random complex samples times random twiddle words
// (and the exact values +1, -1, +j, -j), compared with the integer formula
// (xr*wr - xi*wi, xr*wi + xi*wr), rounded by adding 2^5 and shifting 6.
module tb_complex_multiplier;
  int checks = 0, failures = 0;
  localparam int DW = 11;
  logic signed [DW-1:0] xr, xi, yr, yi;
  logic signed [7:0] wr, wi;

  complex_multiplier #(.DW(DW), .TW(8)) dut (
    .xr(xr), .xi(xi), .wr(wr), .wi(wi), .yr(yr), .yi(yi));

  task automatic chk(input int a, input int b, input int c, input int d);
    int er, ei;
    xr = DW'(a); xi = DW'(b); wr = 8'(c); wi = 8'(d);
    #1;
    er = (a * c - b * d + 32) >>> 6;
    ei = (a * d + b * c + 32) >>> 6;
    checks += 2;
    if (int'(yr) != er) begin
      failures++;
      $display("FAIL re (%0d,%0d)*(%0d,%0d) got %0d exp %0d", a, b, c, d, yr, er);
    end
    if (int'(yi) != ei) begin
      failures++;
      $display("FAIL im (%0d,%0d)*(%0d,%0d) got %0d exp %0d", a, b, c, d, yi, ei);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    chk(300, -200, 64, 0);
    chk(300, -200, -64, 0);
    chk(300, -200, 0, 64);
    chk(300, -200, 0, -64);
    chk(-724, 724, 45, -45);
    for (int i = 0; i < 3000; i++) begin
      int a, b, c, d;
      // keep |x| small enough that the rotated value fits DW bits
      a = int'($urandom_range(1000, 0)) - 500;
      b = int'($urandom_range(1000, 0)) - 500;
      c = int'($urandom_range(128, 0)) - 64;
      d = int'($urandom_range(128, 0)) - 64;
      chk(a, b, c, d);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
