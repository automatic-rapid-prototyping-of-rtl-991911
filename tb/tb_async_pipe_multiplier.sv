// Self-checking testbench for async_pipe_multiplier.
// A producer offers random operand pairs with the two-phase handshake after
// random pauses; a consumer takes products after random pauses. Every
// product must arrive in order and equal a*b. The first product must come
// 72 time units after its request (the stage delays 8+8+8+24+24), and the
// consumer's pauses must at some point fill the pipe so that the producer
// waits for an acknowledge (counted and required).
module tb_async_pipe_multiplier;
  localparam int unsigned NUM = 300;
  int checks = 0, failures = 0, stalls = 0, full_events = 0;
  logic reset, req_in, ack_in, req_out, ack_out;
  logic [3:0] a, b;
  logic [7:0] p;
  logic [7:0] expected [$];

  async_pipe_multiplier dut (
    .reset(reset), .req_in(req_in), .ack_in(ack_in), .a(a), .b(b),
    .req_out(req_out), .ack_out(ack_out), .p(p)
  );

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    time t_first;
    reset = 1'b1; req_in = 1'b0; ack_out = 1'b0; a = '0; b = '0;
    #20 reset = 1'b0;
    #20;
    fork
      begin : producer
        for (int i = 0; i < NUM; i++) begin
          time t_req;
          a = 4'($urandom);
          b = 4'($urandom);
          if (i == 1) begin a = 4'hf; b = 4'hf; end
          expected.push_back(8'(a) * 8'(b));
          #1;
          req_in = ~req_in;
          t_req = $time;
          if (i == 0) t_first = $time;
          #0;
          if (ack_in != req_in) stalls++;
          wait (ack_in == req_in);
          if ($time - t_req > 5) full_events++;
          #($urandom_range(0, 30));
        end
      end
      begin : consumer
        for (int i = 0; i < NUM; i++) begin
          logic [7:0] e;
          wait (req_out != ack_out);
          if (i == 0) begin
            checks++;
            if ($time - t_first != 72) begin
              failures++;
              $display("FAIL first latency %0t, expected 72", $time - t_first);
            end
          end
          #1;
          e = expected.pop_front();
          checks++;
          if (p !== e) begin
            failures++;
            $display("FAIL product %0d: p=%0d expected=%0d", i, p, e);
          end
          // long pauses now and then fill the pipe
          if (i % 50 == 10) #400;
          else #($urandom_range(0, 40));
          ack_out = req_out;
        end
      end
    join
    checks += 2;
    if (stalls == 0)      begin failures++; $display("FAIL producer never stalled"); end
    if (full_events == 0) begin failures++; $display("FAIL pipe never filled"); end
    $display("stalls=%0d full_events=%0d", stalls, full_events);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
