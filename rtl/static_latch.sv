// Static inverting transparent latch, WIDTH bits wide.
//
// While the enable g is high the output follows the inverted input
// (q_n = ~d); when g falls the last value is held. This is the latch of the
// synchronous multiplier's pipeline registers. In the original cell library
// it is enabled by one phase of a two-phase non-overlapping clock; two of them
// on opposite phases form a non-inverting master-slave register
// (ms_register). The inverting sense follows the document; the active-high
// enable is this design's choice.
module static_latch #(
  parameter int unsigned WIDTH = 1
) (
  input  logic             g,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q_n
);

  always_latch begin
    if (g) q_n = ~d;
  end

endmodule
