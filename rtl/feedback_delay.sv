// feedback_delay: the feedback shift register of an SDF stage.
//
// A LEN-deep, WIDTH-bit shift register: on each clock with en high, d enters
// and the word entered LEN enabled clocks earlier appears at q. With en low
// the contents hold. A synchronous active-high reset clears every word.
module feedback_delay #(
  parameter int WIDTH = 11,
  parameter int LEN   = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             en,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  logic [WIDTH-1:0] sr [LEN];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < LEN; i++) sr[i] <= '0;
    end else if (en) begin
      sr[0] <= d;
      for (int i = 1; i < LEN; i++) sr[i] <= sr[i-1];
    end
  end

  assign q = sr[LEN-1];
endmodule
