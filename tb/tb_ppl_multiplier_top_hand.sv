// End-to-end testbench for ppl_multiplier_top with HAND_TRANSLATION set:
// latches clocked straight from clk, half adders in the constant-carry
// positions. Same stimulus and checks as tb_ppl_multiplier_top, except that
// the clock phases must now be clk and its complement, without gaps.
//
// Synchronous side: a 24-unit clock drives the latches directly; a new random
// operand pair is applied every period, late in the clock-high half, and
// each product is checked when it leaves the pipe: it is taken in at the
// next rising edge and appears five periods after that, so the check comes
// six periods after the operands were applied. Counted mechanisms: periods
// with the pipe full of five products in flight, and gaps between the two
// clock phases (an overlap is a failure).
//
// Asynchronous side, concurrently: a producer and a consumer with random
// pauses run the two-phase handshake; every product is checked in order, the
// first one for the 72-unit latency. Counted mechanisms: requests made by a
// rising and by a falling transition (the latches capture on both edges),
// producer stalls waiting for an acknowledge, and the pipe filling while the
// consumer pauses.
//
// Every counted mechanism must occur at least once.
module tb_ppl_multiplier_top_hand;
  localparam bit HAND = 1'b1;  // phases straight from clk: no gaps
  localparam int unsigned NUM_SYNC  = 400;
  localparam int unsigned NUM_ASYNC = 400;
  int checks = 0, failures = 0;
  int n_full_sync = 0, n_phase_gaps = 0, n_rise_req = 0, n_fall_req = 0;
  int n_stalls = 0, n_full_async = 0;

  logic clk = 1'b0, phi0, phi1;
  logic [3:0] sync_a, sync_b, async_a, async_b;
  logic [7:0] sync_p, async_p;
  logic async_reset, async_req_in, async_ack_in, async_req_out, async_ack_out;
  logic [7:0] sync_exp [$];
  logic [7:0] async_exp [$];
  bit sync_done = 1'b0, async_done = 1'b0;

  ppl_multiplier_top #(.HAND_TRANSLATION(1'b1)) dut (
    .clk(clk), .phi0(phi0), .phi1(phi1),
    .sync_a(sync_a), .sync_b(sync_b), .sync_p(sync_p),
    .async_reset(async_reset), .async_req_in(async_req_in), .async_ack_in(async_ack_in),
    .async_a(async_a), .async_b(async_b),
    .async_req_out(async_req_out), .async_ack_out(async_ack_out), .async_p(async_p)
  );

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always #12 clk = ~clk;

  // phase monitor
  logic both_low_prev = 1'b0;
  always #1 begin
    if (phi0 && phi1 && $time > 100) begin
      failures++;
      $display("FAIL clock phases overlap at %0t", $time);
    end
    if (!phi0 && !phi1 && !both_low_prev && $time > 100) n_phase_gaps++;
    both_low_prev = !phi0 && !phi1;
  end

  // synchronous stream
  initial begin
    sync_a = '0; sync_b = '0;
    repeat (10) @(posedge clk);
    for (int j = 0; j < NUM_SYNC + 6; j++) begin
      @(posedge clk);
      #10;  // phi1 (high late in clk-high) has updated the outputs
      if (sync_exp.size() == 6) begin
        logic [7:0] e;
        e = sync_exp.pop_front();
        checks++;
        if (sync_p !== e) begin
          failures++;
          $display("FAIL sync product at iteration %0d: p=%0d expected=%0d", j, sync_p, e);
        end
      end
      if (sync_exp.size() >= 5) n_full_sync++;
      sync_a = 4'($urandom);
      sync_b = 4'($urandom);
      sync_exp.push_back(8'(sync_a) * 8'(sync_b));
    end
    sync_done = 1'b1;
  end

  // asynchronous stream
  initial begin
    time t_first;
    async_reset = 1'b1; async_req_in = 1'b0; async_ack_out = 1'b0;
    async_a = '0; async_b = '0;
    #30 async_reset = 1'b0;
    #20;
    fork
      begin
        for (int i = 0; i < NUM_ASYNC; i++) begin
          time t_req;
          async_a = 4'($urandom);
          async_b = 4'($urandom);
          async_exp.push_back(8'(async_a) * 8'(async_b));
          #1;
          async_req_in = ~async_req_in;
          if (async_req_in) n_rise_req++; else n_fall_req++;
          t_req = $time;
          if (i == 0) t_first = $time;
          #0;
          if (async_ack_in != async_req_in) n_stalls++;
          wait (async_ack_in == async_req_in);
          if ($time - t_req > 5) n_full_async++;
          #($urandom_range(0, 30));
        end
      end
      begin
        for (int i = 0; i < NUM_ASYNC; i++) begin
          logic [7:0] e;
          wait (async_req_out != async_ack_out);
          if (i == 0) begin
            checks++;
            if ($time - t_first != 72) begin
              failures++;
              $display("FAIL async first latency %0t, expected 72", $time - t_first);
            end
          end
          #1;
          e = async_exp.pop_front();
          checks++;
          if (async_p !== e) begin
            failures++;
            $display("FAIL async product %0d: p=%0d expected=%0d", i, async_p, e);
          end
          if (i % 50 == 10) #400;
          else #($urandom_range(0, 40));
          async_ack_out = async_req_out;
        end
      end
    join
    async_done = 1'b1;
  end

  initial begin
    wait (sync_done && async_done);
    $display("sync: full-pipe periods=%0d phase gaps=%0d", n_full_sync, n_phase_gaps);
    $display("async: rising requests=%0d falling requests=%0d stalls=%0d pipe-full waits=%0d",
             n_rise_req, n_fall_req, n_stalls, n_full_async);
    checks += 6;
    if (n_full_sync == 0)  begin failures++; $display("FAIL sync pipe never full"); end
    if (!HAND && n_phase_gaps == 0) begin failures++; $display("FAIL no gap between clock phases"); end
    if (HAND && n_phase_gaps != 0)  begin failures++; $display("FAIL phases not taken from the clock line"); end
    if (n_rise_req == 0)   begin failures++; $display("FAIL no rising request"); end
    if (n_fall_req == 0)   begin failures++; $display("FAIL no falling request"); end
    if (n_stalls == 0)     begin failures++; $display("FAIL producer never stalled"); end
    if (n_full_async == 0) begin failures++; $display("FAIL async pipe never filled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
