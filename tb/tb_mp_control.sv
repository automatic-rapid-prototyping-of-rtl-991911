// Self-checking testbench for mp_control (six ranks, default delays).
//  1. Latency: one request into an empty pipe must reach every rank at the
//     sum of the stage delays before it, req_out after 72 time units.
//  2. Back-pressure: with ack_out withheld the pipe must accept exactly six
//     requests (one per rank) and leave the seventh unacknowledged; once
//     the environment acknowledges, all seven must come out in turn.
//  3. Throughput: with an eager environment on both sides, the steady-state
//     spacing of req_out transitions must not beat the slowest stage (24).
module tb_mp_control;
  localparam int N = 6;
  localparam int unsigned DLY [N] = '{0, 8, 8, 8, 24, 24};
  int checks = 0, failures = 0;
  logic reset, req_in, ack_in, req_out, ack_out;
  logic [N-1:0] en;
  time t_en [N];

  mp_control dut (
    .reset(reset), .req_in(req_in), .ack_in(ack_in),
    .req_out(req_out), .ack_out(ack_out), .en(en)
  );

  logic [N-1:0] en_prev = '0;
  always @(en) begin
    for (int k = 0; k < N; k++) if (en[k] != en_prev[k]) t_en[k] = $time;
    en_prev = en;
  end

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    time t0, last, gap, min_gap;
    int accepted, delivered;
    reset = 1'b1; req_in = 1'b0; ack_out = 1'b0;
    #10 reset = 1'b0;
    #10;
    check(en == '0, "reset state");

    // 1. latency
    t0 = $time;
    req_in = 1'b1;
    #200;
    begin
      time cum = 0;
      for (int k = 0; k < N; k++) begin
        cum += DLY[k];
        check(en[k] == 1'b1, $sformatf("rank %0d fired", k));
        check(t_en[k] - t0 == cum, $sformatf("rank %0d time %0t expected %0t", k, t_en[k] - t0, cum));
      end
    end
    check(req_out == 1'b1 && t_en[N-1] - t0 == 72, "req_out latency 72");
    check(ack_in == 1'b1, "ack_in answered");
    ack_out = 1'b1;  // take the result
    #50;

    // 2. back-pressure: offer 7 requests, ack_out withheld
    accepted = 0;
    for (int i = 0; i < 7; i++) begin
      req_in = ~req_in;
      #200;
      if (ack_in == req_in) accepted++;
    end
    check(accepted == 6, $sformatf("pipe holds %0d tokens, expected 6", accepted));
    check(ack_in != req_in, "seventh request waits");
    delivered = 0;
    for (int i = 0; i < 7; i++) begin
      check(req_out != ack_out, $sformatf("token %0d delivered", i));
      if (req_out != ack_out) delivered++;
      ack_out = req_out;
      #200;
    end
    check(delivered == 7, "all seven tokens delivered");
    check(ack_in == req_in, "seventh request accepted after release");

    // 3. throughput with eager environment
    fork
      begin
        for (int i = 0; i < 40; i++) begin
          wait (ack_in == req_in);
          #1 req_in = ~req_in;
        end
      end
      begin
        last = 0; min_gap = 1000;
        for (int i = 0; i < 40; i++) begin
          wait (req_out != ack_out);
          if (i > 10) begin
            gap = $time - last;
            if (gap < min_gap) min_gap = gap;
          end
          last = $time;
          #1 ack_out = req_out;
        end
      end
    join
    $display("steady-state output spacing %0t", min_gap);
    check(min_gap >= 24 && min_gap <= 60, "throughput bounded by the slowest stage");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
