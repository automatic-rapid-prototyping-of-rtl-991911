// Asynchronous (micropipelined) 4-bit pipelined array multiplier.
//
// The datapath is the synchronous version's: six latch ranks with the five
// mult_array_stage blocks between them. There is no clock. Each rank is a
// bank of dual-edge-triggered latches whose enable is that rank's C-element
// output in mp_control; a rank captures when the rank before has new data
// and the rank after has taken the old data, so every stage takes only as
// long as its own logic (its matched delay) needs.
//
// Interface (two-phase bundled data): set a and b, then make a transition on
// req_in; a and b must stay stable until ack_in makes the same transition.
// When req_out makes a transition, p holds the product of the oldest
// operands not yet delivered; answer with a transition on ack_out once p has
// been used. reset (active high) initialises the control with req_in and
// ack_out low. With the default delays the first product appears 72 time
// units after its request.
//
// Structure, latch type and signalling follow the document; delays and the
// word carried between ranks are this design's choices (see mp_control).
// STYLE and HALF_ADDERS choose the adder cells (see mult_array_stage).
module async_pipe_multiplier
  import ppl_mult_pkg::*;
#(
  parameter fa_style_e   STYLE = FA_THREE_MODULES,
  parameter bit          HALF_ADDERS = 1'b0,
  parameter int unsigned STAGE_DELAY [RANKS] = '{0, 8, 8, 8, 24, 24},
  parameter int unsigned ACK_DELAY = 1
) (
  input  logic              reset,
  input  logic              req_in,
  output logic              ack_in,
  input  logic [OP_W-1:0]   a,
  input  logic [OP_W-1:0]   b,
  output logic              req_out,
  input  logic              ack_out,
  output logic [PROD_W-1:0] p
);

  logic [RANKS-1:0] en;  // enable of each latch rank

  mp_control #(
    .N_RANKS(RANKS), .STAGE_DELAY(STAGE_DELAY), .ACK_DELAY(ACK_DELAY)
  ) u_ctrl (
    .reset(reset), .req_in(req_in), .ack_in(ack_in),
    .req_out(req_out), .ack_out(ack_out), .en(en)
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

    det_latch #(.WIDTH(STAGE_W)) u_lat (.en(en[r]), .d(d_w), .q(q_w));
  end

  assign p = g_rank[RANKS-1].q_w.s;

endmodule
