// r4sdf_stage: one stage of a radix-4 single-path delay feedback FFT.
//
// The stage works on blocks of 4L samples (L = N / 4^(S+1)) that arrive one
// per enabled clock. Three L-deep feedback shift registers D0, D1, D2 hold
// what is waiting. The local count cnt (0 .. 4L-1, supplied from outside)
// splits a block into four phases of L samples:
//   phase 0: the input enters D0; D0's output leaves the stage (result y1)
//   phase 1: the input enters D1; D1's output leaves (y2)
//   phase 2: the input enters D2; D2's output leaves (y3)
//   phase 3: D0, D1, D2 deliver x[k], x[k+L], x[k+2L] just as x[k+3L]
//            arrives; the radix-4 butterfly runs, y0 leaves at once and
//            y1, y2, y3 go back into D0, D1, D2.
// A register that is not loaded in a phase feeds its own output back, so
// every word keeps its slot. The outgoing stream is y0, y1, y2, y3 (each L
// samples) of one block, 3L clocks behind the input, as the next stage
// needs. Every stage but the last multiplies output sample k of group m by
// the twiddle W_{4L}^{m k} (m k N/(4L) as an index into the N-point table).
// The result is registered: latency from input to output is 3L + 1 enabled
// clocks. Widths: input W = DW + 1 + 2S bits, output W + 2 bits, no scaling.
// The three feedback registers, the butterfly and the multiplier between
// stages follow the SDF structure of the design; the recirculating register
// control is this design's choice.
module r4sdf_stage #(
  parameter int N    = 64,   // transform length
  parameter int S    = 0,    // stage index, 0 = first
  parameter int DW   = 8,    // FFT input sample width
  parameter int TW   = 8,    // twiddle width
  parameter bit LAST = 1'b0, // no twiddle multiplication after the last stage
  localparam int L   = fft_pkg::stage_len(N, S),
  localparam int W   = fft_pkg::stage_width(DW, S),
  localparam int OW  = W + 2,
  localparam int CW  = $clog2(4 * L)
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 en,
  input  logic [CW-1:0]        cnt,
  input  logic signed [W-1:0]  in_re,
  input  logic signed [W-1:0]  in_im,
  output logic signed [OW-1:0] out_re,
  output logic signed [OW-1:0] out_im
);
  localparam int NW = $clog2(N);

  logic [1:0] phase;
  logic signed [OW-1:0] xr, xi;
  logic signed [OW-1:0] dq_re [3], dq_im [3];
  logic signed [OW-1:0] dd_re [3], dd_im [3];
  logic signed [OW-1:0] y_re [4], y_im [4];
  logic signed [OW-1:0] sel_re, sel_im, tw_re, tw_im;

  assign phase = cnt[CW-1 -: 2];
  assign xr    = OW'(in_re);
  assign xi    = OW'(in_im);

  for (genvar i = 0; i < 3; i++) begin : g_fb
    feedback_delay #(.WIDTH(2 * OW), .LEN(L)) u_re_im (
      .clk(clk), .rst(rst), .en(en),
      .d({dd_re[i], dd_im[i]}), .q({dq_re[i], dq_im[i]})
    );
  end

  r4_butterfly #(.W(W)) u_bf (
    .a0r(W'(dq_re[0])), .a0i(W'(dq_im[0])),
    .a1r(W'(dq_re[1])), .a1i(W'(dq_im[1])),
    .a2r(W'(dq_re[2])), .a2i(W'(dq_im[2])),
    .a3r(in_re),        .a3i(in_im),
    .y0r(y_re[0]), .y0i(y_im[0]), .y1r(y_re[1]), .y1i(y_im[1]),
    .y2r(y_re[2]), .y2i(y_im[2]), .y3r(y_re[3]), .y3i(y_im[3])
  );

  always_comb begin
    for (int i = 0; i < 3; i++) begin
      dd_re[i] = dq_re[i];
      dd_im[i] = dq_im[i];
    end
    sel_re = y_re[0];
    sel_im = y_im[0];
    if (phase == 2'd3) begin
      for (int i = 0; i < 3; i++) begin
        dd_re[i] = y_re[i+1];
        dd_im[i] = y_im[i+1];
      end
    end else begin
      dd_re[phase] = xr;
      dd_im[phase] = xi;
      sel_re       = dq_re[phase];
      sel_im       = dq_im[phase];
    end
  end

  if (LAST) begin : g_no_tw
    assign tw_re = sel_re;
    assign tw_im = sel_im;
  end else begin : g_tw
    logic [CW-1:0] j;
    logic [1:0]    m;
    logic [NW-1:0] e;
    logic signed [TW-1:0] wr, wi;
    always_comb begin
      j = cnt + CW'(L);          // output position within the block
      m = j[CW-1 -: 2];
      e = NW'(int'(m) * (int'(j) % L) * (N / (4 * L)));
    end
    twiddle_rom #(.N(N), .TW(TW)) u_rom (.e(e), .wr(wr), .wi(wi));
    complex_multiplier #(.DW(OW), .TW(TW)) u_cmul (
      .xr(sel_re), .xi(sel_im), .wr(wr), .wi(wi), .yr(tw_re), .yi(tw_im)
    );
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_re <= '0;
      out_im <= '0;
    end else if (en) begin
      out_re <= tw_re;
      out_im <= tw_im;
    end
  end
endmodule
