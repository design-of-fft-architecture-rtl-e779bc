// fft64_r4sdf: N-point radix-4 single-path delay feedback (SDF) FFT,
// 64 points by default, with Booth/Kogge-Stone twiddle multipliers.
//
// One complex sample (data_real_in, data_imaginary_in, signed DW bits)
// enters per clock in which in_valid is high; blocks of N consecutive
// samples are transformed back to back. The input is registered and passes
// log4(N) radix-4 SDF stages (3 for N = 64, feedback registers of 16, 4 and
// 1 words). Between stages each sample is rotated by its twiddle factor in a
// complex multiplier built from radix-4 Booth multipliers whose partial
// products are summed by Kogge-Stone adders.
//
// Output: one complex sample (data_real_out, data_imaginary_out, signed
// DW + 1 + 2 log4(N) bits, unscaled: X[k] = sum_n x[n] e^{-j 2 pi n k / N},
// up to twiddle rounding) per enabled clock, marked by out_valid. Bins come
// in base-4 digit-reversed order; out_pos is the sample's position in the
// output block, out_bin names its frequency bin and out_first marks the first sample of a block. Latency: N + log4(N) enabled
// clocks from input sample 0 of a block to its first output sample.
// When in_valid is low the whole pipeline holds (a stall); a block's results
// therefore leave only while the next block is being fed. Reset is
// synchronous, active high, and clears all storage.
// The stage structure, the 8-bit input and 8 x 8 Booth multipliers are the
// design's; the input register, handshake, word growth, twiddle word length
// and the output marking are this implementation's choices.
module fft64_r4sdf #(
  parameter int N   = 64,  // transform length, a power of 4
  parameter int DW  = 8,   // input sample width
  parameter int TW  = 8,   // twiddle width (TW-2 fraction bits)
  localparam int NS = fft_pkg::log4(N),
  localparam int OW = DW + 1 + 2 * NS,
  localparam int NW = $clog2(N)
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 in_valid,
  input  logic signed [DW-1:0] data_real_in,
  input  logic signed [DW-1:0] data_imaginary_in,
  output logic signed [OW-1:0] data_real_out,
  output logic signed [OW-1:0] data_imaginary_out,
  output logic                 out_valid,
  output logic                 out_first,
  output logic [NW-1:0]        out_pos,
  output logic [NW-1:0]        out_bin
);
  localparam int LAT = N + NS;

  logic [NW-1:0] count;

  // stage s reads bus[s] and drives bus[s+1]; unused high bits are sign copies
  logic signed [OW-1:0] bus_re [NS+1];
  logic signed [OW-1:0] bus_im [NS+1];

  sdf_controller #(.N(N), .LAT(LAT)) u_ctrl (
    .clk(clk), .rst(rst), .en(in_valid), .count(count),
    .out_valid(out_valid), .out_first(out_first),
    .out_pos(out_pos), .out_bin(out_bin)
  );

  // input register
  always_ff @(posedge clk) begin
    if (rst) begin
      bus_re[0] <= '0;
      bus_im[0] <= '0;
    end else if (in_valid) begin
      bus_re[0] <= OW'(data_real_in);
      bus_im[0] <= OW'(data_imaginary_in);
    end
  end

  for (genvar s = 0; s < NS; s++) begin : g_stage
    localparam int L  = fft_pkg::stage_len(N, s);
    localparam int W  = fft_pkg::stage_width(DW, s);
    localparam int CW = $clog2(4 * L);
    logic [CW-1:0] cnt;
    logic signed [W+1:0] o_re, o_im;
    // stage s sees block position (count - 1 - s) mod 4L
    assign cnt = CW'(count - NW'(s + 1));
    r4sdf_stage #(.N(N), .S(s), .DW(DW), .TW(TW), .LAST(s == NS - 1)) u_stage (
      .clk(clk), .rst(rst), .en(in_valid), .cnt(cnt),
      .in_re(W'(bus_re[s])), .in_im(W'(bus_im[s])),
      .out_re(o_re), .out_im(o_im)
    );
    assign bus_re[s+1] = OW'(o_re);
    assign bus_im[s+1] = OW'(o_im);
  end

  assign data_real_out      = bus_re[NS];
  assign data_imaginary_out = bus_im[NS];
endmodule
