// Non-inverting master-slave register for a two-phase non-overlapping clock,
// built from two inverting static latches.
//
// The master latch is open during phi0 and the slave during phi1; the two
// inversions cancel. Because the phases never overlap there is no
// transparent path from d to q. The stored word changes at q as phi1 rises,
// so with phi1 high while the source clock is high this behaves like a
// rising-edge flip-flop on that clock. Which phase opens the master is this
// design's choice.
module ms_register #(
  parameter int unsigned WIDTH = 1
) (
  input  logic             phi0,
  input  logic             phi1,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  logic [WIDTH-1:0] m_n;

  static_latch #(.WIDTH(WIDTH)) u_master (.g(phi0), .d(d),   .q_n(m_n));
  static_latch #(.WIDTH(WIDTH)) u_slave  (.g(phi1), .d(m_n), .q_n(q));

endmodule
