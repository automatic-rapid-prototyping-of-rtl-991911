// ACT-1 basic logic module: the one eight-input, one-output cell from which
// every macro of this FPGA family is built.
//
// Two 2:1 multiplexers choose between A0/A1 (select SELA) and B0/B1 (select
// SELB); a third 2:1 multiplexer chooses between their outputs, its select
// being the OR of SEL0 and SEL1. With the OR low the A side reaches OUT,
// with it high the B side. A multiplexer select of 1 picks the input with
// index 1. The module structure and pin names are the device's; which side
// the OR selects follows the usual description of this module.
//
// Purely combinational, no timing of its own. Tying inputs to constants
// turns it into inverters, gates and 4:1 multiplexers (the full adder of
// this design uses it that way).
module act1_logic_module (
  input  logic a0,
  input  logic a1,
  input  logic sela,
  input  logic b0,
  input  logic b1,
  input  logic selb,
  input  logic sel0,
  input  logic sel1,
  output logic out
);

  logic mux_a, mux_b, sel_ab;

  always_comb begin
    mux_a  = sela ? a1 : a0;
    mux_b  = selb ? b1 : b0;
    sel_ab = sel0 | sel1;
    out    = sel_ab ? mux_b : mux_a;
  end

endmodule
