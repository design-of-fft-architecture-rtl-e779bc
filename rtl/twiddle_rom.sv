// twiddle_rom: table of the N-th roots of unity W_N^e, e = 0 .. N-1.
//
// Returns W_N^e = cos(2 pi e / N) - j sin(2 pi e / N) as two signed TW-bit
// words with TW-2 fraction bits (+1.0 = 2^(TW-2)). The table is computed at
// elaboration from cos/sin (see fft_pkg::twiddle_word), so it follows any N.
// Combinational read: the words for index e are valid in the same cycle.
// The table format and word length are this design's choice.
module twiddle_rom #(
  parameter int N  = 64,
  parameter int TW = 8
) (
  input  logic [$clog2(N)-1:0] e,
  output logic signed [TW-1:0] wr,
  output logic signed [TW-1:0] wi
);
  typedef logic [2*TW-1:0] entry_t;

  function automatic entry_t [N-1:0] build();
    entry_t [N-1:0] t;
    logic [63:0] w;
    for (int i = 0; i < N; i++) begin
      w    = fft_pkg::twiddle_word(i, N, TW);
      t[i] = {w[32+TW-1:32], w[TW-1:0]};
    end
    return t;
  endfunction

  localparam entry_t [N-1:0] TABLE = build();

  assign wr = TABLE[e][2*TW-1:TW];
  assign wi = TABLE[e][TW-1:0];
endmodule
