// One-bit full adder with the interface of the PPL library's fastest adder
// cell: active-low carry in (ci_n), active-low carry out (co_n) and an
// inverted sum (sum_n). The A and B inputs are active high.
//
// Two mappings onto ACT-1 logic modules are offered, chosen by STYLE:
//
//   FA_THREE_MODULES (default)  three basic modules. One is wired as an
//     inverter producing ~b. The carry module selects on a and b among the
//     constants 1 and 0 and ci_n: co_n = 1 when a=b=0, 0 when a=b=1, ci_n
//     otherwise. The sum module selects on ci_n and a among b and ~b:
//     sum_n = a ^ b ^ ci_n. The sum sees two logic levels (the inverter and
//     one multiplexer module).
//   FA_FA1B_INV  the library adder with active-low carries and a positive
//     sum, followed by an inverter on the sum (one logic level more).
//
// The three-module wiring (which signal goes to which select and data pin)
// is worked out here from the cell's function; the use of constants 1 and 0
// on the carry module and an inverter on b are taken from the published
// drawing of this cell. The library adder's insides are not published, so
// FA_FA1B_INV is written from its function.
//
// Combinational, no clock.
module ppl_full_adder
  import ppl_mult_pkg::*;
#(
  parameter fa_style_e STYLE = FA_THREE_MODULES
) (
  input  logic a,
  input  logic b,
  input  logic ci_n,
  output logic co_n,
  output logic sum_n
);

  if (STYLE == FA_THREE_MODULES) begin : g_three_modules
    logic b_n;

    // Inverter: a module with SELA as the input and constant data 1/0.
    act1_logic_module u_inv (
      .a0(1'b1), .a1(1'b0), .sela(b),
      .b0(1'b0), .b1(1'b0), .selb(1'b0),
      .sel0(1'b0), .sel1(1'b0),
      .out(b_n)
    );

    // Carry: a=0 side gives b ? ci_n : 1, a=1 side gives b ? 0 : ci_n.
    act1_logic_module u_carry (
      .a0(1'b1), .a1(ci_n), .sela(b),
      .b0(ci_n), .b1(1'b0), .selb(b),
      .sel0(a), .sel1(1'b0),
      .out(co_n)
    );

    // Sum: ci_n=0 side gives a ^ b, ci_n=1 side gives ~(a ^ b).
    act1_logic_module u_sum (
      .a0(b), .a1(b_n), .sela(a),
      .b0(b_n), .b1(b), .selb(a),
      .sel0(ci_n), .sel1(1'b0),
      .out(sum_n)
    );
  end else begin : g_fa1b_inv
    logic ci, sum;

    always_comb begin
      ci    = ~ci_n;
      sum   = a ^ b ^ ci;
      co_n  = ~((a & b) | (a & ci) | (b & ci));
      sum_n = ~sum;  // the extra output inverter
    end
  end

endmodule
