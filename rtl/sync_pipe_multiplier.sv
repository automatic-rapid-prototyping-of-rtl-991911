// Synchronous 4-bit pipelined array multiplier.
//
// Six register ranks, one at the input and one after each of the five
// mult_array_stage blocks (three carry-save rows and the two halves of the
// carry-propagate adder), so the datapath runs one row of adders per clock.
// Every register is a master-slave pair of inverting static latches on the
// two non-overlapping clock phases phi0 and phi1.
//
// Interface: a and b are sampled into the input rank at the end of every
// phi0 pulse (held by it through phi1); p presents a*b five clock periods
// later, updated while phi1 is high. A new product is accepted every period.
// There is no reset: the pipe holds whatever it was given until it has been
// filled.
//
// The partition into rows, the register after every row and the five-cycle
// latency follow the document; the layout of the word carried between ranks
// (ppl_mult_pkg::mult_stage_t) is this design's. STYLE and HALF_ADDERS
// choose the adder cells (see mult_array_stage).
module sync_pipe_multiplier
  import ppl_mult_pkg::*;
#(
  parameter fa_style_e STYLE       = FA_THREE_MODULES,
  parameter bit        HALF_ADDERS = 1'b0
) (
  input  logic              phi0,
  input  logic              phi1,
  input  logic [OP_W-1:0]   a,
  input  logic [OP_W-1:0]   b,
  output logic [PROD_W-1:0] p
);

  // One register rank per iteration: d_w is the word entering the rank
  // (the operands for rank 0, the previous stage's result otherwise) and
  // q_w the word it holds.
  for (genvar r = 0; r < RANKS; r++) begin : g_rank
    mult_stage_t d_w, q_w;

    if (r == 0) begin : g_in
      always_comb begin
        d_w   = '0;
        d_w.a = a;
        d_w.b = b;
      end
    end else begin : g_stage
      mult_array_stage #(.STAGE(r), .STYLE(STYLE), .HALF_ADDERS(HALF_ADDERS)) u_stage (
        .d(g_rank[r-1].q_w), .q(d_w)
      );
    end

    ms_register #(.WIDTH(STAGE_W)) u_reg (
      .phi0(phi0), .phi1(phi1), .d(d_w), .q(q_w)
    );
  end

  assign p = g_rank[RANKS-1].q_w.s;

endmodule
