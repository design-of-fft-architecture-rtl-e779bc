// r4_butterfly: radix-4 decimation-in-frequency butterfly.
//
// Four complex inputs a0..a3 (the samples L apart in the stage's block) give
//   y0 = a0 +   a1 + a2 +   a3
//   y1 = a0 - j a1 - a2 + j a3
//   y2 = a0 -   a1 + a2 -   a3
//   y3 = a0 + j a1 - a2 - j a3
// Multiplying by -j or +j only swaps real and imaginary parts and negates
// one of them, so the butterfly has adders only. Outputs are two bits wider
// than the inputs, so no result can overflow. Purely combinational.
module r4_butterfly #(
  parameter int W = 9    // input width; outputs are W+2 bits
) (
  input  logic signed [W-1:0]   a0r, a0i, a1r, a1i, a2r, a2i, a3r, a3i,
  output logic signed [W+1:0]   y0r, y0i, y1r, y1i, y2r, y2i, y3r, y3i
);
  logic signed [W+1:0] b0r, b0i, b1r, b1i, b2r, b2i, b3r, b3i;
  always_comb begin
    b0r = (W+2)'(a0r); b0i = (W+2)'(a0i);
    b1r = (W+2)'(a1r); b1i = (W+2)'(a1i);
    b2r = (W+2)'(a2r); b2i = (W+2)'(a2i);
    b3r = (W+2)'(a3r); b3i = (W+2)'(a3i);
    y0r = b0r + b1r + b2r + b3r;
    y0i = b0i + b1i + b2i + b3i;
    y1r = b0r + b1i - b2r - b3i;
    y1i = b0i - b1r - b2i + b3r;
    y2r = b0r - b1r + b2r - b3r;
    y2i = b0i - b1i + b2i - b3i;
    y3r = b0r - b1i - b2r + b3i;
    y3i = b0i + b1r - b2i - b3r;
  end
endmodule
