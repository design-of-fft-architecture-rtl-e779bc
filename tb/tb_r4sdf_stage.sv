// tb_r4sdf_stage: streams random blocks, with random enable gaps, through
// two SDF stages of a 16-point FFT: the first stage (L = 4, with twiddle
// multiplication) and the last stage (L = 1, no twiddle). Each output is
// compared bit-exactly with a block model: radix-4 butterfly over the
// samples L apart, then rotation by W_16^(m k) rounded to 6 fraction bits.
// Checks that output sample j of a block appears 3L + 1 enabled clocks
// after input sample j of the block (output order y0, y1, y2, y3).
module tb_r4sdf_stage;
  localparam int N = 16;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, en = 0;

  // first stage: L = 4, W = 9, OW = 11
  logic [3:0] cnt0;
  logic signed [8:0]  in0_re, in0_im;
  logic signed [10:0] out0_re, out0_im;
  // last stage: L = 1, W = 11, OW = 13
  logic [1:0] cnt1;
  logic signed [10:0] in1_re, in1_im;
  logic signed [12:0] out1_re, out1_im;

  r4sdf_stage #(.N(N), .S(0), .DW(8), .TW(8), .LAST(1'b0)) dut0 (
    .clk(clk), .rst(rst), .en(en), .cnt(cnt0),
    .in_re(in0_re), .in_im(in0_im), .out_re(out0_re), .out_im(out0_im));
  r4sdf_stage #(.N(N), .S(1), .DW(8), .TW(8), .LAST(1'b1)) dut1 (
    .clk(clk), .rst(rst), .en(en), .cnt(cnt1),
    .in_re(in1_re), .in_im(in1_im), .out_re(out1_re), .out_im(out1_im));

  always #5 clk = ~clk;

  function automatic int rnd(input real v);
    if (v >= 0.0) return int'($floor(v + 0.5));
    return -int'($floor(-v + 0.5));
  endfunction

  // block model: butterfly + optional twiddle, for a block of 4L samples
  task automatic model(input int L, input bit tw, input int xr[], input int xi[],
                       output int yr[], output int yi[]);
    yr = new[4 * L];
    yi = new[4 * L];
    for (int k = 0; k < L; k++)
      for (int m = 0; m < 4; m++) begin
        int sr, si;
        sr = 0; si = 0;
        for (int i = 0; i < 4; i++) begin
          int r, q, t;
          r = xr[k + i * L]; q = xi[k + i * L];
          for (int n = 0; n < (m * i) % 4; n++) begin t = r; r = q; q = -t; end
          sr += r; si += q;
        end
        if (tw) begin
          int c, s, e;
          e = (m * k * (N / (4 * L))) % N;
          c = rnd(64.0 * $cos(2.0 * 3.141592653589793 * e / N));
          s = rnd(-64.0 * $sin(2.0 * 3.141592653589793 * e / N));
          yr[m * L + k] = (sr * c - si * s + 32) >>> 6;
          yi[m * L + k] = (sr * s + si * c + 32) >>> 6;
        end else begin
          yr[m * L + k] = sr;
          yi[m * L + k] = si;
        end
      end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NB = 12;  // blocks of 16 samples for stage 0
  int xr0 [NB * 16], xi0 [NB * 16];
  int xr1 [NB * 16], xi1 [NB * 16];

  initial begin
    int t;
    int er0 [], ei0 [], er1 [], ei1 [];
    int br [], bi [];
    for (int n = 0; n < NB * 16; n++) begin
      xr0[n] = int'($urandom_range(255, 0)) - 128;
      xi0[n] = int'($urandom_range(255, 0)) - 128;
      xr1[n] = int'($urandom_range(1023, 0)) - 512;
      xi1[n] = int'($urandom_range(1023, 0)) - 512;
    end
    cnt0 = '0; cnt1 = '0;
    in0_re = '0; in0_im = '0; in1_re = '0; in1_im = '0;
    @(posedge clk); #1; rst = 0;
    t = 0;
    while (t < NB * 16) begin
      en = ($urandom_range(4, 0) != 0);
      cnt0 = 4'(t);
      cnt1 = 2'(t);
      in0_re = 9'(xr0[t]);  in0_im = 9'(xi0[t]);
      in1_re = 11'(xr1[t]); in1_im = 11'(xi1[t]);
      @(posedge clk); #1;
      if (en) begin
        // stage 0: output j of block b appears after tick t = 16b + 12 + j
        if (t >= 12) begin
          int b, j;
          b = (t - 12) / 16; j = (t - 12) % 16;
          br = new[16]; bi = new[16];
          for (int n = 0; n < 16; n++) begin br[n] = xr0[16 * b + n]; bi[n] = xi0[16 * b + n]; end
          model(4, 1'b1, br, bi, er0, ei0);
          checks++;
          if (int'(out0_re) != er0[j] || int'(out0_im) != ei0[j]) begin
            failures++;
            $display("FAIL stage0 t=%0d got (%0d,%0d) exp (%0d,%0d)", t, out0_re, out0_im, er0[j], ei0[j]);
          end
        end
        // last stage: blocks of 4, output j after tick 4b + 3 + j
        if (t >= 3) begin
          int b, j;
          b = (t - 3) / 4; j = (t - 3) % 4;
          br = new[4]; bi = new[4];
          for (int n = 0; n < 4; n++) begin br[n] = xr1[4 * b + n]; bi[n] = xi1[4 * b + n]; end
          model(1, 1'b0, br, bi, er1, ei1);
          checks++;
          if (int'(out1_re) != er1[j] || int'(out1_im) != ei1[j]) begin
            failures++;
            $display("FAIL stage1 t=%0d got (%0d,%0d) exp (%0d,%0d)", t, out1_re, out1_im, er1[j], ei1[j]);
          end
        end
        t++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
