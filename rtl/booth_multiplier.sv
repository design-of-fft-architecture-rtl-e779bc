// booth_multiplier: signed AW x BW multiplier, radix-4 Booth recoding with
// the partial products summed by Kogge-Stone adders.
//
// Flow: booth_encoder recodes the multiplier y into BW/2 signed digits;
// one booth_pp_gen per digit makes a row (m, 2m or 0, inverted for a negative
// digit); each row is sign-extended to the product width and shifted left by
// two bits per digit. The rows are summed by a chain of PW-bit ks_adder
// instances, and a last ks_adder adds the correction word that holds the
// "+1" of every inverted row (bit 2i for digit i). The defaults (8 x 8 bits,
// 16-bit product and 16-bit adders) are the sizes of the design; the adder
// arrangement (a chain, not a tree) is this design's choice.
// Purely combinational: p = m * y, exact, two's complement.
module booth_multiplier #(
  parameter int AW = 8,  // multiplicand width
  parameter int BW = 8   // multiplier width, even
) (
  input  logic signed [AW-1:0]    m,
  input  logic signed [BW-1:0]    y,
  output logic signed [AW+BW-1:0] p
);
  localparam int PW = AW + BW;
  localparam int ND = BW / 2;

  logic [ND-1:0] one, two, neg;
  logic [PW-1:0] rows [ND];
  logic [PW-1:0] acc  [ND+1];
  logic [PW-1:0] corr;

  booth_encoder #(.BW(BW)) u_enc (.y(y), .one(one), .two(two), .neg(neg));

  for (genvar i = 0; i < ND; i++) begin : g_row
    logic [AW:0] r;
    booth_pp_gen #(.AW(AW)) u_pp (
      .m(m), .one(one[i]), .two(two[i]), .neg(neg[i]), .row(r)
    );
    // sign-extend to PW bits and weight by 4^i
    assign rows[i] = PW'({{(PW - AW - 1){r[AW]}}, r} << (2 * i));
  end

  always_comb begin
    corr = '0;
    for (int i = 0; i < ND; i++) corr[2*i] = neg[i];
  end

  assign acc[0] = rows[0];
  for (genvar i = 1; i < ND; i++) begin : g_sum
    ks_adder #(.WIDTH(PW)) u_add (
      .a(acc[i-1]), .b(rows[i]), .cin(1'b0), .s(acc[i]), .cout()
    );
  end
  ks_adder #(.WIDTH(PW)) u_corr (
    .a(acc[ND-1]), .b(corr), .cin(1'b0), .s(acc[ND]), .cout()
  );

  assign p = signed'(acc[ND]);
endmodule
