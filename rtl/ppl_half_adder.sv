// One-bit half adder with the same output senses as ppl_full_adder: an
// active-low carry out (co_n) and an inverted sum (sum_n). It replaces the
// full adder wherever the carry in is a constant 0, saving one FPGA logic
// module per adder.
//
// Two ACT-1 basic modules, both steered by a on the output select:
//   sum:   a=0 side passes ~b, a=1 side passes b    -> sum_n = ~(a ^ b)
//   carry: a=0 side gives 1,   a=1 side gives ~b    -> co_n  = ~(a & b)
// In each, b selects between constant data inputs, so no separate inverter
// is needed. The substitution of a half adder follows the document; its
// mapping onto two modules is this design's.
//
// Combinational, no clock.
module ppl_half_adder (
  input  logic a,
  input  logic b,
  output logic co_n,
  output logic sum_n
);

  act1_logic_module u_sum (
    .a0(1'b1), .a1(1'b0), .sela(b),
    .b0(1'b0), .b1(1'b1), .selb(b),
    .sel0(a), .sel1(1'b0),
    .out(sum_n)
  );

  act1_logic_module u_carry (
    .a0(1'b1), .a1(1'b1), .sela(1'b0),
    .b0(1'b1), .b1(1'b0), .selb(b),
    .sel0(a), .sel1(1'b0),
    .out(co_n)
  );

endmodule
