// sdf_controller: sample counter and output marking of the SDF FFT.
//
// count is a modulo-N counter of enabled clocks since reset (0 in the first
// enabled clock); every stage derives its local block count from it. After
// the pipeline latency LAT enabled clocks, out_valid pulses for each enabled
// clock and marks a new sample in the output register. out_pos is the
// position of that sample within its N-sample output block and out_bin is
// its frequency index: the stages leave the spectrum in base-4
// digit-reversed order, so the bin is out_pos with its base-4 digits
// reversed. out_first marks out_pos == 0. All outputs are registered.
// The counter and the marking outputs are this design's choice.
module sdf_controller #(
  parameter int N   = 64,
  parameter int LAT = 67,  // enabled clocks from input sample 0 to output sample 0
  localparam int NW = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          en,
  output logic [NW-1:0] count,
  output logic          out_valid,
  output logic          out_first,
  output logic [NW-1:0] out_pos,
  output logic [NW-1:0] out_bin
);
  localparam int ND = fft_pkg::log4(N);
  localparam int FW = $clog2(LAT + 1);

  logic [FW-1:0] fill;     // enabled clocks seen, saturating at LAT
  logic [NW-1:0] next_pos;

  assign next_pos = count + NW'(N - (LAT % N)) + NW'(1);

  always_ff @(posedge clk) begin
    if (rst) begin
      count     <= '0;
      fill      <= '0;
      out_valid <= 1'b0;
      out_first <= 1'b0;
      out_pos   <= '0;
      out_bin   <= '0;
    end else begin
      out_valid <= 1'b0;
      out_first <= 1'b0;
      if (en) begin
        count <= count + 1'b1;
        if (fill != FW'(LAT)) fill <= fill + 1'b1;
        if (32'(fill) + 1 >= LAT) begin
          out_valid <= 1'b1;
          out_first <= (next_pos == '0);
          out_pos   <= next_pos;
          out_bin   <= NW'(fft_pkg::digit_rev4(int'(next_pos), ND));
        end
      end
    end
  end
endmodule
