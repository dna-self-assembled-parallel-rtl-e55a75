// ringer: the only output a DAMP processor has. While `en` is high it
// oscillates (toggles every clock), a signal an external receiver can detect;
// while `en` is low it is held at 0. The source architecture names the ringer
// and its purpose only; a clocked toggle is this design's digital stand-in for
// the oscillator. Timing: `osc` goes high on the first clock edge after `en`
// rises and returns to 0 on the first edge after `en` falls.
module ringer (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  output logic osc
);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)   osc <= 1'b0;
    else if (en)  osc <= ~osc;
    else          osc <= 1'b0;
endmodule
