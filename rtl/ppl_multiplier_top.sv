// Both versions of the 4-bit pipelined array multiplier, side by side, each
// with its own ports.
//
// Synchronous version: clk drives the two-phase non-overlapping clock
// generator, whose phases clock sync_pipe_multiplier. sync_a and sync_b are
// taken at every rising edge of clk (precisely, at the end of the phase that
// is high while clk is low) and sync_p gives their product five clock periods
// later. The phases are brought out as phi0 and phi1.
//
// Asynchronous version: async_pipe_multiplier with its two-phase
// request/acknowledge handshake (see that module) and its own reset.
//
// Both multipliers use the same five-stage datapath of carry-save rows and a
// two-stage carry-propagate adder. STYLE picks the full adder mapping for
// both.
//
// HAND_TRANSLATION = 0 (default) keeps the cell-for-cell equivalent of the
// custom chips: the clock generator and full adders everywhere.
// HAND_TRANSLATION = 1 applies two of the optimisations proposed for a
// hand translation: the clock generator is dropped and the latches are
// clocked straight from clk (phi0 = ~clk, phi1 = clk, as on an FPGA's
// dedicated single-phase clock line), and half adders replace full adders
// whose carry in is constant. Both multipliers give the same results and
// latencies either way.
module ppl_multiplier_top
  import ppl_mult_pkg::*;
#(
  parameter fa_style_e   STYLE      = FA_THREE_MODULES,
  parameter int unsigned GATE_DELAY = 1,
  parameter bit          HAND_TRANSLATION = 1'b0
) (
  // synchronous multiplier
  input  logic              clk,
  output logic              phi0,
  output logic              phi1,
  input  logic [OP_W-1:0]   sync_a,
  input  logic [OP_W-1:0]   sync_b,
  output logic [PROD_W-1:0] sync_p,
  // asynchronous multiplier
  input  logic              async_reset,
  input  logic              async_req_in,
  output logic              async_ack_in,
  input  logic [OP_W-1:0]   async_a,
  input  logic [OP_W-1:0]   async_b,
  output logic              async_req_out,
  input  logic              async_ack_out,
  output logic [PROD_W-1:0] async_p
);

  if (HAND_TRANSLATION) begin : g_clock_line
    assign phi0 = ~clk;
    assign phi1 = clk;
  end else begin : g_clkgen
    logic phi0_n_open, phi1_n_open;  // complements, not used by the latches
    two_phase_clock_gen #(.GATE_DELAY(GATE_DELAY)) u_clkgen (
      .clk(clk), .phi0(phi0), .phi0_n(phi0_n_open), .phi1(phi1), .phi1_n(phi1_n_open)
    );
  end

  sync_pipe_multiplier #(.STYLE(STYLE), .HALF_ADDERS(HAND_TRANSLATION)) u_smo (
    .phi0(phi0), .phi1(phi1), .a(sync_a), .b(sync_b), .p(sync_p)
  );

  async_pipe_multiplier #(.STYLE(STYLE), .HALF_ADDERS(HAND_TRANSLATION)) u_amo (
    .reset(async_reset),
    .req_in(async_req_in), .ack_in(async_ack_in), .a(async_a), .b(async_b),
    .req_out(async_req_out), .ack_out(async_ack_out), .p(async_p)
  );

endmodule
