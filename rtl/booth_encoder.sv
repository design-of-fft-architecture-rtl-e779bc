// booth_encoder: radix-4 (modified) Booth recoding of a signed multiplier.
//
// The BW-bit two's-complement multiplier y is cut into BW/2 overlapping
// triplets (y[2i+1], y[2i], y[2i-1]) with y[-1] = 0. Each triplet selects a
// digit in {-2, -1, 0, +1, +2}, returned as three flags per digit:
//   one[i] : the digit's magnitude is 1
//   two[i] : the digit's magnitude is 2
//   neg[i] : the digit is negative
// Purely combinational. The design specifies a Booth encoder in front of the
// partial-product generators; the radix-4 recoding table is the standard
// one, chosen because it halves the number of partial products.
module booth_encoder #(
  parameter int BW = 8   // multiplier width, even
) (
  input  logic [BW-1:0]   y,
  output logic [BW/2-1:0] one,
  output logic [BW/2-1:0] two,
  output logic [BW/2-1:0] neg
);
  logic [BW:0] ye;  // y with the implicit y[-1] = 0 at bit 0
  assign ye = {y, 1'b0};

  for (genvar i = 0; i < BW / 2; i++) begin : g_digit
    logic b2, b1, b0;
    assign b2     = ye[2*i+2];
    assign b1     = ye[2*i+1];
    assign b0     = ye[2*i];
    assign one[i] = b1 ^ b0;
    assign two[i] = (b2 & ~b1 & ~b0) | (~b2 & b1 & b0);
    assign neg[i] = b2 & ~(b1 & b0);
  end

  initial begin
    assert (BW % 2 == 0) else $error("booth_encoder: BW must be even");
  end
endmodule
