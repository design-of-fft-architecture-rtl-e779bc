// booth_pp_gen: one partial-product row of a radix-4 Booth multiplier.
//
// From the signed AW-bit multiplicand m and the digit flags of one Booth
// triplet it forms the AW+1-bit row
//   one: m (sign-extended),  two: 2*m,  neither: 0,
// and inverts the row when the digit is negative. The "+1" that completes
// the two's-complement negation is not added here: the multiplier adds all
// such bits in one correction word. Purely combinational.
module booth_pp_gen #(
  parameter int AW = 8   // multiplicand width
) (
  input  logic [AW-1:0] m,
  input  logic          one,
  input  logic          two,
  input  logic          neg,
  output logic [AW:0]   row
);
  logic [AW:0] sel;
  always_comb begin
    if (one)      sel = {m[AW-1], m};
    else if (two) sel = {m, 1'b0};
    else          sel = '0;
    row = neg ? ~sel : sel;
  end
endmodule
