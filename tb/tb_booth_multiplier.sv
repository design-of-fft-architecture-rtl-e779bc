// tb_booth_multiplier: exhaustive check of the 8 x 8 signed Booth multiplier
// (all 65536 operand pairs) and a 16 x 16 copy with the operands
// 0x2AC9 * 0x2AC9 and 0x2AC9 * 0x02C9 plus random pairs.
module tb_booth_multiplier;
  int checks = 0, failures = 0;
  logic signed [7:0]  m, y;
  logic signed [15:0] p;
  logic signed [15:0] m16, y16;
  logic signed [31:0] p16;

  booth_multiplier #(.AW(8), .BW(8))   dut   (.m(m), .y(y), .p(p));
  booth_multiplier #(.AW(16), .BW(16)) dut16 (.m(m16), .y(y16), .p(p16));

  task automatic chk16(input logic signed [15:0] a, input logic signed [15:0] b);
    m16 = a; y16 = b;
    #1;
    checks++;
    if (p16 != 32'(int'(a) * int'(b))) begin
      failures++;
      $display("FAIL16 %0d * %0d = %0d", a, b, p16);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = -128; a < 128; a++)
      for (int b = -128; b < 128; b++) begin
        m = 8'(a); y = 8'(b);
        #1;
        checks++;
        if (int'(p) != a * b) begin
          failures++;
          if (failures < 10) $display("FAIL %0d * %0d = %0d", a, b, p);
        end
      end
    chk16(16'h2AC9, 16'h2AC9);
    chk16(16'h2AC9, 16'h02C9);
    chk16(16'sh8000, 16'sh8000);
    chk16(16'sh8000, 16'sh7FFF);
    for (int i = 0; i < 2000; i++) chk16(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
