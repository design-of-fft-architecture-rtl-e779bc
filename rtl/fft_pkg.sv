// fft_pkg: constants and elaboration-time helpers shared by the radix-4
// single-path delay feedback (SDF) FFT.
//
// It holds the word-length rules of the pipeline (every radix-4 butterfly
// adds two integer bits, nothing is scaled away), base-4 digit reversal used
// to name the frequency bin of each output sample, and the twiddle-factor
// generator. Twiddles are computed here from cos/sin at elaboration time,
// rounded to signed TW-bit words with TW-2 fraction bits (so +1.0 is exactly
// representable); the word length of the twiddles is this design's choice.
package fft_pkg;

  // Number of radix-4 stages for an N-point transform (N a power of 4).
  function automatic int log4(input int n);
    int r;
    r = 0;
    while (n > 1) begin
      n = n / 4;
      r++;
    end
    return r;
  endfunction

  // Sample width seen at the input of stage s (stage 0 gets one guard bit
  // over the DW-bit input; each stage grows the word by two bits).
  function automatic int stage_width(input int dw, input int s);
    return dw + 1 + 2 * s;
  endfunction

  // Delay-line length of stage s of an N-point radix-4 SDF: N/4^(s+1).
  function automatic int stage_len(input int n, input int s);
    int l;
    l = n;
    for (int i = 0; i <= s; i++) l = l / 4;
    return l;
  endfunction

  // Reverse the order of the base-4 digits of idx (ndig digits).
  function automatic int digit_rev4(input int idx, input int ndig);
    int r;
    r = 0;
    for (int i = 0; i < ndig; i++) begin
      r = (r << 2) | ((idx >> (2 * i)) & 3);
    end
    return r;
  endfunction

  // Round a real value to the nearest integer (ties away from zero).
  function automatic int round_real(input real v);
    if (v >= 0.0) return int'($floor(v + 0.5));
    else return -int'($floor(-v + 0.5));
  endfunction

  // Twiddle W_N^e = cos(2*pi*e/N) - j*sin(2*pi*e/N) in TW-bit words with
  // TW-2 fraction bits. Returns {re, im} packed as 2*TW bits.
  function automatic logic [63:0] twiddle_word(input int e, input int n, input int tw);
    real    ang, sc;
    int     re, im;
    logic [31:0] rv, iv;
    ang = 2.0 * 3.14159265358979323846 * real'(e) / real'(n);
    sc  = real'(1 << (tw - 2));
    re  = round_real(sc * $cos(ang));
    im  = round_real(-sc * $sin(ang));
    rv  = 32'(re);
    iv  = 32'(im);
    return {rv, iv};
  endfunction

endpackage
