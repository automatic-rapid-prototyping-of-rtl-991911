// Self-checking testbench for static_latch: while g is high q_n must follow
// ~d, after g falls q_n must hold the last value whatever d does.
module tb_static_latch;
  int checks = 0, failures = 0;
  logic g;
  logic [7:0] d, q_n, held;

  static_latch #(.WIDTH(8)) dut (.g(g), .d(d), .q_n(q_n));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [7:0] exp, input string what);
    checks++;
    if (q_n !== exp) begin
      failures++;
      $display("FAIL %s: q_n=%h expected=%h", what, q_n, exp);
    end
  endtask

  initial begin
    g = 1'b1;
    for (int i = 0; i < 50; i++) begin
      g = 1'b1;
      d = 8'($urandom);
      #1 check(~d, "transparent");
      d = 8'($urandom);
      #1 check(~d, "transparent, second value");
      held = ~d;
      g = 1'b0;
      #1;
      for (int j = 0; j < 4; j++) begin
        d = 8'($urandom);
        #1 check(held, "holding");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
