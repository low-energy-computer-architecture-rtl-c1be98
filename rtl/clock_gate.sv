// Clock gate of the dual-base multiplier.
//
// The enable is captured in a register clocked on the falling edge of clk,
// and the gated clock is clk ANDed with that register.  Because the
// register only changes while clk is low, gclk never glitches: an enable
// presented during a cycle takes effect at the next rising edge and lasts for
// the whole high phase.  The multiplier gates its binary-path registers with
// (mult_en & ~bd), its decimal-path registers with (mult_en & bd) and its
// output register with the stage-2 valid bit.  Capturing the binary/decimal
// select in a negative-edge register before the AND gate follows the
// document; the asynchronous active-low reset (gate closed) is this design's
// choice.
module clock_gate (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  output logic gclk
);
  logic en_q;

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) en_q <= 1'b0;
    else        en_q <= en;
  end

  assign gclk = clk & en_q;
endmodule
