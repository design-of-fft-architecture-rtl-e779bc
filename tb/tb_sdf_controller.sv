// tb_sdf_controller: runs the controller of a 64-point FFT with random
// enable gaps and checks that the sample count follows the enabled clocks,
// that out_valid first pulses exactly LAT enabled clocks after reset and
// then once per enabled clock, that out_pos steps through 0 .. 63, that
// out_bin is out_pos with its three base-4 digits reversed, and that
// out_first marks position 0.
module tb_sdf_controller;
  localparam int N = 64, LAT = 67;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, en = 0;
  logic [5:0] count, out_pos, out_bin;
  logic out_valid, out_first;

  sdf_controller #(.N(N), .LAT(LAT)) dut (
    .clk(clk), .rst(rst), .en(en), .count(count), .out_valid(out_valid),
    .out_first(out_first), .out_pos(out_pos), .out_bin(out_bin));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rev(input int p);
    return ((p & 3) << 4) | (p & 12) | ((p >> 4) & 3);
  endfunction

  initial begin
    int ticks, exp_pos;
    ticks = 0;
    exp_pos = 0;
    @(posedge clk); #1; rst = 0;
    for (int n = 0; n < 1500; n++) begin
      en = ($urandom_range(3, 0) != 0);
      @(posedge clk); #1;
      if (en) ticks++;
      checks++;
      if (int'(count) != ticks % N) begin
        failures++;
        $display("FAIL count %0d exp %0d", count, ticks % N);
      end
      checks++;
      if (out_valid != (en && ticks >= LAT)) begin
        failures++;
        $display("FAIL out_valid=%0d en=%0d ticks=%0d", out_valid, en, ticks);
      end
      if (out_valid) begin
        checks++;
        if (int'(out_pos) != exp_pos || int'(out_bin) != rev(exp_pos) ||
            out_first != (exp_pos == 0)) begin
          failures++;
          $display("FAIL pos=%0d bin=%0d first=%0d exp pos %0d", out_pos, out_bin, out_first, exp_pos);
        end
        exp_pos = (exp_pos + 1) % N;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
