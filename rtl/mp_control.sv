// Request/acknowledge control of a two-phase micropipeline with N_RANKS latch
// ranks.
//
// Rank k has one C-element. Its inputs are the request reaching rank k and
// the complement of the acknowledge from rank k+1; its output en[k] is the
// enable of rank k's dual-edge-triggered latches, the acknowledge to rank
// k-1 and, through a matched delay of STAGE_DELAY[k] time units, the request
// to rank k+1. Every transition (rising or falling) is one event. A rank
// therefore captures new data when the rank before it has new data and the
// rank after it has taken the previous data.
//
// Interface: a transition on req_in offers new input data, which must stay
// stable until ack_in (= en[0]) makes the same transition. req_out (= the last
// rank's enable) makes a transition when a result is in the last rank; the
// environment answers with a transition on ack_out when it has taken it.
// reset (active high) clears every C-element; req_in and ack_out must be low
// then. STAGE_DELAY[k] (k >= 1) must cover the logic between rank k-1 and
// rank k; ACK_DELAY stands for the C-element's own switching time on the
// acknowledge wire.
//
// The C-element, two-phase signalling and the capture rule follow the
// document; the acknowledge inversion at the C-element input and the delay
// values are this design's choices. The default delays split the published
// 72 ns end-to-end latency into 8 for each carry-save row and 24 for each
// carry-propagate stage, the latter being the published slowest stage.
module mp_control #(
  parameter int unsigned N_RANKS = 6,
  parameter int unsigned STAGE_DELAY [N_RANKS] = '{0, 8, 8, 8, 24, 24},
  parameter int unsigned ACK_DELAY = 1
) (
  input  logic               reset,
  input  logic               req_in,
  output logic               ack_in,
  output logic               req_out,
  input  logic               ack_out,
  output logic [N_RANKS-1:0] en
);

  logic [N_RANKS-1:0] req;   // request arriving at each rank
  logic [N_RANKS-1:0] ack;   // acknowledge arriving at each rank from the next

  assign req[0] = req_in;

  for (genvar k = 0; k < N_RANKS; k++) begin : g_rank
    c_element u_c (
      .reset(reset), .i1(req[k]), .i2(~ack[k]), .out(en[k]), .out_n()
    );

    if (k > 0) begin : g_req
      matched_delay #(.DELAY(STAGE_DELAY[k])) u_req_dly (.in(en[k-1]), .out(req[k]));
    end

    if (k < N_RANKS - 1) begin : g_ack
      matched_delay #(.DELAY(ACK_DELAY)) u_ack_dly (.in(en[k+1]), .out(ack[k]));
    end else begin : g_ack_out
      assign ack[k] = ack_out;
    end
  end

  assign ack_in  = en[0];
  assign req_out = en[N_RANKS-1];

endmodule
