// tb_fft64_r4sdf: end-to-end test of the 64-point radix-4 SDF FFT at its
// default parameters.
//
// Seven 64-sample blocks are streamed back to back (a ramp 0..63 on both
// parts, an impulse, a single tone, full-scale negative DC, full-scale
// alternating signs and two random blocks), followed by two blocks of zeros
// that push the last results out. in_valid is dropped at random, so the
// pipeline is stalled often. Every output sample is checked:
//  * bit-exactly against a fixed-point model written here as a plain
//    radix-4 decimation-in-frequency recursion over whole blocks, with the
//    twiddles rounded to 6 fraction bits and products rounded to nearest;
//  * against a floating-point DFT, within a tolerance set by the twiddle
//    word length;
//  * for its bin index (base-4 digit reversal) and block start marker;
//  * for the latency: the first output appears after N + 3 = 67 samples.
// It counts how often each mechanism happened (stalls, back-to-back block
// boundaries, non-trivial twiddle rotations, out-of-order bins) and counts
// a failure for any that never did.
module tb_fft64_r4sdf;
  localparam int N = 64, NS = 3, LAT = N + NS, NB = 7;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, in_valid = 0;
  logic signed [7:0]  din_re, din_im;
  logic signed [14:0] dout_re, dout_im;
  logic out_valid, out_first;
  logic [5:0] out_bin, out_pos;

  fft64_r4sdf dut (
    .clk(clk), .rst(rst), .in_valid(in_valid),
    .data_real_in(din_re), .data_imaginary_in(din_im),
    .data_real_out(dout_re), .data_imaginary_out(dout_im),
    .out_valid(out_valid), .out_first(out_first), .out_pos(out_pos), .out_bin(out_bin));

  always #5 clk = ~clk;

  int xr [NB+2][N], xi [NB+2][N];
  int mr [NB+1][N], mi [NB+1][N];   // model output, in stream (digit-reversed) order
  int stalls = 0, boundaries = 0, rotations = 0, reordered = 0;

  function automatic int rnd(input real v);
    if (v >= 0.0) return int'($floor(v + 0.5));
    return -int'($floor(-v + 0.5));
  endfunction

  function automatic int rev4(input int p);
    int r;
    r = 0;
    for (int i = 0; i < NS; i++) begin r = (r << 2) | (p & 3); p = p >> 2; end
    return r;
  endfunction

  // fixed-point radix-4 DIF over one block, in place, output digit-reversed
  task automatic model(input int b);
    int ar [N], ai [N];
    for (int n = 0; n < N; n++) begin ar[n] = xr[b][n]; ai[n] = xi[b][n]; end
    for (int s = 0, L = N / 4; s < NS; s++, L = L / 4) begin
      int nr [N], ni [N];
      for (int base = 0; base < N; base += 4 * L)
        for (int k = 0; k < L; k++)
          for (int m = 0; m < 4; m++) begin
            int sr, si;
            sr = 0; si = 0;
            for (int i = 0; i < 4; i++) begin
              int r, q, t;
              r = ar[base + k + i * L]; q = ai[base + k + i * L];
              for (int n = 0; n < (m * i) % 4; n++) begin t = r; r = q; q = -t; end
              sr += r; si += q;
            end
            if (s < NS - 1) begin
              int c, sn, e;
              e = (m * k * (N / (4 * L))) % N;
              if (e % (N / 4) != 0 && (sr != 0 || si != 0)) rotations++;
              c  = rnd(64.0 * $cos(2.0 * 3.141592653589793 * e / N));
              sn = rnd(-64.0 * $sin(2.0 * 3.141592653589793 * e / N));
              nr[base + m * L + k] = (sr * c - si * sn + 32) >>> 6;
              ni[base + m * L + k] = (sr * sn + si * c + 32) >>> 6;
            end else begin
              nr[base + m * L + k] = sr;
              ni[base + m * L + k] = si;
            end
          end
      ar = nr; ai = ni;
    end
    for (int n = 0; n < N; n++) begin mr[b][n] = ar[n]; mi[b][n] = ai[n]; end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output checker
  int outs = 0, ticks = 0, first_tick = -1;
  always @(posedge clk) begin
    #1;
    if (!rst && out_valid) begin
      int b, p, bin;
      real dr, di, er, ei, tol, sa;
      b = outs / N; p = outs % N; bin = rev4(p);
      if (outs == 0) first_tick = ticks;
      if (b < NB) begin
        checks++;
        if (int'(dout_re) != mr[b][p] || int'(dout_im) != mi[b][p]) begin
          failures++;
          $display("FAIL block %0d pos %0d: got (%0d,%0d) model (%0d,%0d)",
                   b, p, dout_re, dout_im, mr[b][p], mi[b][p]);
        end
        checks++;
        if (int'(out_bin) != bin || int'(out_pos) != p || out_first != (p == 0)) begin
          failures++;
          $display("FAIL block %0d pos %0d: bin %0d exp %0d first %0d", b, p, out_bin, bin, out_first);
        end
        if (bin != p) reordered++;
        dr = 0.0; di = 0.0; sa = 0.0;
        for (int n = 0; n < N; n++) begin
          real a;
          a  = 2.0 * 3.141592653589793 * ((n * bin) % N) / N;
          dr += xr[b][n] * $cos(a) + xi[b][n] * $sin(a);
          di += xi[b][n] * $cos(a) - xr[b][n] * $sin(a);
          sa += (xr[b][n] < 0 ? -xr[b][n] : xr[b][n]) + (xi[b][n] < 0 ? -xi[b][n] : xi[b][n]);
        end
        er = real'(dout_re) - dr; ei = real'(dout_im) - di;
        tol = 4.0 + 0.03 * sa;
        checks++;
        if (er > tol || -er > tol || ei > tol || -ei > tol) begin
          failures++;
          $display("FAIL block %0d bin %0d: got (%0d,%0d) DFT (%f,%f)", b, bin, dout_re, dout_im, dr, di);
        end
      end
      outs++;
    end
  end

  initial begin
    int n;
    for (int b = 0; b <= NB + 1; b++)
      for (int k = 0; k < N; k++) begin
        case (b)
          0: begin xr[b][k] = k; xi[b][k] = k; end
          1: begin xr[b][k] = (k == 0) ? 127 : 0; xi[b][k] = 0; end
          2: begin
               xr[b][k] = rnd(100.0 * $cos(2.0 * 3.141592653589793 * 5 * k / N));
               xi[b][k] = rnd(100.0 * $sin(2.0 * 3.141592653589793 * 5 * k / N));
             end
          3: begin xr[b][k] = -128; xi[b][k] = -128; end
          4: begin xr[b][k] = (k % 2) ? -128 : 127; xi[b][k] = (k % 2) ? 127 : -128; end
          NB, NB + 1: begin xr[b][k] = 0; xi[b][k] = 0; end
          default: begin
               xr[b][k] = int'($urandom_range(255, 0)) - 128;
               xi[b][k] = int'($urandom_range(255, 0)) - 128;
             end
        endcase
      end
    for (int b = 0; b < NB; b++) model(b);

    din_re = '0; din_im = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    n = 0;
    while (n < (NB + 2) * N) begin
      in_valid = (n < 5) || ($urandom_range(5, 0) != 0);
      din_re = 8'(xr[n / N][n % N]);
      din_im = 8'(xi[n / N][n % N]);
      @(posedge clk);
      if (in_valid) begin
        ticks++;
        if (n % N == 0 && n > 0) boundaries++;
        n++;
      end else stalls++;
      #2;
    end
    in_valid = 0;
    repeat (4) @(posedge clk);
    #2;
    checks++;
    if (outs < NB * N) begin
      failures++;
      $display("FAIL only %0d outputs for %0d blocks", outs, NB);
    end
    checks++;
    if (first_tick != LAT) begin
      failures++;
      $display("FAIL first output after %0d samples, expected %0d", first_tick, LAT);
    end
    $display("mechanisms: stalls=%0d block_boundaries=%0d twiddle_rotations=%0d reordered_bins=%0d",
             stalls, boundaries, rotations, reordered);
    checks += 4;
    if (stalls == 0) failures++;
    if (boundaries == 0) failures++;
    if (rotations == 0) failures++;
    if (reordered == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
