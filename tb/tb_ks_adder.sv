// tb_ks_adder: self-checking test of the Kogge-Stone adder.
// Applies the worked example 2 + 3 = 5, corner cases (all ones, carry
// ripple across all 16 bits, carry-in) and random operands to the 16-bit
// adder and an 8-bit copy, comparing sum and carry-out with the integer sum.
module tb_ks_adder;
  int checks = 0, failures = 0;

  logic [15:0] a, b, s;
  logic        cin, cout;
  logic [7:0]  a8, b8, s8;
  logic        cin8, cout8;

  ks_adder #(.WIDTH(16)) dut   (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));
  ks_adder #(.WIDTH(8))  dut8  (.a(a8), .b(b8), .cin(cin8), .s(s8), .cout(cout8));

  task automatic check16(input logic [15:0] x, input logic [15:0] y, input logic c);
    logic [16:0] exp;
    a = x; b = y; cin = c;
    #1;
    exp = 17'(x) + 17'(y) + 17'(c);
    checks++;
    if ({cout, s} !== exp) begin
      failures++;
      $display("FAIL16 %h + %h + %0d: got %h exp %h", x, y, c, {cout, s}, exp);
    end
  endtask

  task automatic check8(input logic [7:0] x, input logic [7:0] y, input logic c);
    logic [8:0] exp;
    a8 = x; b8 = y; cin8 = c;
    #1;
    exp = 9'(x) + 9'(y) + 9'(c);
    checks++;
    if ({cout8, s8} !== exp) begin
      failures++;
      $display("FAIL8 %h + %h + %0d: got %h exp %h", x, y, c, {cout8, s8}, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check16(16'd2, 16'd3, 1'b0);
    check8(8'd2, 8'd3, 1'b0);
    check16(16'hFFFF, 16'h0001, 1'b0);
    check16(16'hFFFF, 16'h0000, 1'b1);
    check16(16'hFFFF, 16'hFFFF, 1'b1);
    check16(16'h7FFF, 16'h0001, 1'b0);
    check16(16'h8000, 16'h8000, 1'b0);
    for (int i = 0; i < 2000; i++)
      check16(16'($urandom), 16'($urandom), 1'($urandom));
    for (int x = 0; x < 256; x += 3)
      for (int y = 0; y < 256; y += 5) check8(8'(x), 8'(y), 1'(x ^ y));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
