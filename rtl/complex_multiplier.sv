// complex_multiplier: twiddle multiplication of one complex sample,
//   (xr + j xi)(wr + j wi) = (xr wr - xi wi) + j (xr wi + xi wr).
//
// The four real products come from four booth_multiplier instances; the
// difference for the real part and the sum for the imaginary part are formed
// by two Kogge-Stone adders (the subtraction as a + ~b + 1, using the adder's
// carry-in). The twiddle has TW-2 fraction bits, so the exact result is
// rounded to nearest by adding half an LSB and shifting right by TW-2.
// The output keeps the input width DW: the caller guarantees the rotated
// value fits (a twiddle has unit magnitude and the FFT stages carry enough
// headroom). Purely combinational.
module complex_multiplier #(
  parameter int DW = 8,  // sample width
  parameter int TW = 8   // twiddle width, TW-2 fraction bits
) (
  input  logic signed [DW-1:0] xr,
  input  logic signed [DW-1:0] xi,
  input  logic signed [TW-1:0] wr,
  input  logic signed [TW-1:0] wi,
  output logic signed [DW-1:0] yr,
  output logic signed [DW-1:0] yi
);
  localparam int PW = DW + TW;
  localparam int TF = TW - 2;

  logic signed [PW-1:0] p_rr, p_ii, p_ri, p_ir;
  logic        [PW-1:0] s_re, s_im;
  logic signed [PW-1:0] r_re, r_im;

  booth_multiplier #(.AW(DW), .BW(TW)) u_rr (.m(xr), .y(wr), .p(p_rr));
  booth_multiplier #(.AW(DW), .BW(TW)) u_ii (.m(xi), .y(wi), .p(p_ii));
  booth_multiplier #(.AW(DW), .BW(TW)) u_ri (.m(xr), .y(wi), .p(p_ri));
  booth_multiplier #(.AW(DW), .BW(TW)) u_ir (.m(xi), .y(wr), .p(p_ir));

  // real part: p_rr - p_ii ; imaginary part: p_ri + p_ir
  ks_adder #(.WIDTH(PW)) u_sub (
    .a(p_rr), .b(~p_ii), .cin(1'b1), .s(s_re), .cout()
  );
  ks_adder #(.WIDTH(PW)) u_add (
    .a(p_ri), .b(p_ir), .cin(1'b0), .s(s_im), .cout()
  );

  // round to nearest, drop the TF fraction bits, keep DW bits
  always_comb begin
    r_re = (signed'(s_re) + signed'(PW'(1) <<< (TF - 1))) >>> TF;
    r_im = (signed'(s_im) + signed'(PW'(1) <<< (TF - 1))) >>> TF;
    yr   = r_re[DW-1:0];
    yi   = r_im[DW-1:0];
  end
endmodule
