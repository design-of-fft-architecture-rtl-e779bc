// tb_twiddle_rom: checks the 64-entry twiddle table at the exact points
// (W^0 = 1, W^16 = -j, W^32 = -1, W^48 = +j, W^8 = (45, -45)) and every
// entry against 64*cos(2 pi e/64), -64*sin(2 pi e/64) within half an LSB,
// plus a 16-entry table.
module tb_twiddle_rom;
  int checks = 0, failures = 0;
  logic [5:0] e;
  logic signed [7:0] wr, wi;
  logic [3:0] e16;
  logic signed [7:0] wr16, wi16;

  twiddle_rom #(.N(64), .TW(8)) dut   (.e(e), .wr(wr), .wi(wi));
  twiddle_rom #(.N(16), .TW(8)) dut16 (.e(e16), .wr(wr16), .wi(wi16));

  task automatic exact(input int idx, input int r, input int i);
    e = 6'(idx);
    #1;
    checks++;
    if (int'(wr) != r || int'(wi) != i) begin
      failures++;
      $display("FAIL W^%0d = (%0d,%0d) exp (%0d,%0d)", idx, wr, wi, r, i);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    exact(0, 64, 0);
    exact(16, 0, -64);
    exact(32, -64, 0);
    exact(48, 0, 64);
    exact(8, 45, -45);
    for (int k = 0; k < 64; k++) begin
      real cr, ci;
      e = 6'(k);
      #1;
      cr = 64.0 * $cos(2.0 * 3.141592653589793 * k / 64.0);
      ci = -64.0 * $sin(2.0 * 3.141592653589793 * k / 64.0);
      checks++;
      if ((real'(wr) - cr) > 0.5 || (cr - real'(wr)) > 0.5 ||
          (real'(wi) - ci) > 0.5 || (ci - real'(wi)) > 0.5) begin
        failures++;
        $display("FAIL W^%0d = (%0d,%0d) vs (%f,%f)", k, wr, wi, cr, ci);
      end
    end
    for (int k = 0; k < 16; k++) begin
      e16 = 4'(k);
      e   = 6'(4 * k);
      #1;
      checks++;
      if (wr16 != wr || wi16 != wi) begin
        failures++;
        $display("FAIL N=16 W^%0d differs from N=64 W^%0d", k, 4 * k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
