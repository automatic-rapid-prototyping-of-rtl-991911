// Dual-edge-triggered latch, WIDTH bits wide: the storage element between the
// stages of the micropipelined multiplier.
//
// Two transparent latches share the data input: one is open while en is
// high, the other while en is low. A 2:1 multiplexer steered by en passes the
// output of the latch that is currently closed. Each edge of en therefore
// closes one latch on the value then at d and switches the output to it:
// q takes the value of d at every transition of en, rising or falling, and
// holds it until the next one. That suits two-phase (transition) signalling,
// where every transition of a stage's control signal means "capture".
//
// The two latches of opposite enable polarity and the multiplexer follow the
// published cell; which latch the multiplexer selects for which level of en
// is chosen here so that the cell captures on both edges, as described.
// d must be stable around each edge of en (setup and hold as for any latch).
module det_latch #(
  parameter int unsigned WIDTH = 1
) (
  input  logic             en,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  logic [WIDTH-1:0] q_hi;  // open while en = 1, holds the value from the falling edge
  logic [WIDTH-1:0] q_lo;  // open while en = 0, holds the value from the rising edge

  always_latch begin
    if (en) q_hi = d;
  end

  always_latch begin
    if (!en) q_lo = d;
  end

  assign q = en ? q_lo : q_hi;

endmodule
