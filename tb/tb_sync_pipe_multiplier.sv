// Self-checking testbench for sync_pipe_multiplier: a new random operand
// pair every clock period, two non-overlapping phases generated here, and
// every product checked exactly five periods after its operands went in
// (the stream changes every period, so a product that came out a period
// early or late would not match).
module tb_sync_pipe_multiplier;
  import ppl_mult_pkg::*;
  localparam int LATENCY = 5;
  int checks = 0, failures = 0;
  logic phi0 = 1'b0, phi1 = 1'b0;
  logic [3:0] a, b;
  logic [7:0] p;
  logic [7:0] expected [$];

  sync_pipe_multiplier dut (.phi0(phi0), .phi1(phi1), .a(a), .b(b), .p(p));

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One period: phi0 high 10, gap 2, phi1 high 10, gap 2 (24 units).
  task automatic cycle();
    phi0 = 1'b1; #10; phi0 = 1'b0; #2;
    phi1 = 1'b1; #10; phi1 = 1'b0; #2;
  endtask

  initial begin
    int n = 0;
    a = 0; b = 0;
    for (int i = 0; i < 300; i++) begin
      a = 4'($urandom);
      b = 4'($urandom);
      // for directed corners
      if (i == 10) begin a = 4'hf; b = 4'hf; end
      if (i == 11) begin a = 4'h0; b = 4'hf; end
      expected.push_back(8'(a) * 8'(b));
      cycle();  // operands taken at the end of phi0, result of i-5 seen in phi1
      if (expected.size() > LATENCY) begin
        logic [7:0] e;
        e = expected.pop_front();
        checks++;
        n++;
        if (p !== e) begin
          failures++;
          $display("FAIL result %0d: p=%0d expected=%0d", n, p, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
