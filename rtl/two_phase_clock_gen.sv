// Behavioural model: two-phase non-overlapping clock generator, gate delays
// included. It is a model because the gap between the phases comes only from
// the gates' propagation delays, which synthesis does not keep; simulate it
// with timing enabled.
//
// From one clock clk it derives phase phi0 (high while clk is low) and phase
// phi1 (high while clk is high), with a gap between them in which both are
// low, plus the complements phi0_n and phi1_n. The structure is that of the
// library clock driver mapped onto FPGA gates: one branch is a GAND2 (an AND
// with one active-low input) taking ~clk, an AND2 gating it with phi1_n and
// two inverters giving phi0_n and phi0; the other branch is a GAND2 forming
// clk & ~phi0 and two inverters giving phi1_n and phi1. Each phase can rise
// only after the other one has fallen, so they never overlap.
//
// Which feedback signal enters which gate is this design's reading of the
// cross-coupled drawing. With GATE_DELAY d per gate, phi0 falls 4d after clk
// rises and phi1 rises 3d later; phi1 falls 3d after clk falls and phi0
// rises 2d later. Delays are in simulator time units.
module two_phase_clock_gen #(
  parameter int unsigned GATE_DELAY = 1
) (
  input  logic clk,
  output logic phi0,
  output logic phi0_n,
  output logic phi1,
  output logic phi1_n
);

  logic clk_low;   // GAND2 with its active-low input on clk, other input tied high
  logic phi0_on;   // AND2: clk low and phi1 fallen
  logic phi1_on;   // GAND2: clk high and phi0 fallen

  assign #(GATE_DELAY) clk_low = 1'b1 & ~clk;
  assign #(GATE_DELAY) phi0_on = clk_low & phi1_n;
  assign #(GATE_DELAY) phi0_n  = ~phi0_on;
  assign #(GATE_DELAY) phi0    = ~phi0_n;

  assign #(GATE_DELAY) phi1_on = clk & ~phi0;
  assign #(GATE_DELAY) phi1_n  = ~phi1_on;
  assign #(GATE_DELAY) phi1    = ~phi1_n;

endmodule
