// Behavioural model: a delay line on one control wire of the micropipeline,
// standing for the short inverter chain that matches a stage's logic delay.
//
// out repeats in after DELAY simulator time units. A request transition sent
// through it reaches the next stage no earlier than the data computed by the
// stage's adders, which is the bundled-data rule the micropipeline relies
// on. A real chain of an even number of inverters has a fixed delay set by
// its length; here the delay is a parameter, which is also how the
// delay can be re-targeted to a faster technology. Synthesis keeps only the
// wire, so the delay must then be built from real gates.
module matched_delay #(
  parameter int unsigned DELAY = 1
) (
  input  logic in,
  output logic out
);

  assign #(DELAY) out = in;

endmodule
