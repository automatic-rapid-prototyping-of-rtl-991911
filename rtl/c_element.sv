// Muller C-element with reset and both output senses.
//
// out goes low when both inputs are low, high when both are high, and keeps
// its value while they differ. reset (active high) forces out low, the
// initial state of every micropipeline control element. out_n is the
// complement of out, as the library cell offers both senses.
//
// Written as a level-sensitive latch: it is open while i1 equals i2 and then
// loads i1. This is the same function as the published three-module mapping
// (two multiplexer modules with feedback and an output inverter), in a form
// that synthesis and two-state simulation handle without a combinational
// loop. The reset polarity is this design's choice.
module c_element (
  input  logic reset,
  input  logic i1,
  input  logic i2,
  output logic out,
  output logic out_n
);

  always_latch begin
    if (reset)         out = 1'b0;
    else if (i1 == i2) out = i1;
  end

  assign out_n = ~out;

endmodule
