// Self-checking testbench for det_latch: q must take the value of d at every
// edge of en, rising and falling, and ignore changes of d between edges.
module tb_det_latch;
  int checks = 0, failures = 0, rise_caps = 0, fall_caps = 0;
  logic en;
  logic [7:0] d, q, captured;

  det_latch #(.WIDTH(8)) dut (.en(en), .d(d), .q(q));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 1'b0;
    d  = 8'h00;
    #5;
    for (int i = 0; i < 100; i++) begin
      d = 8'($urandom);
      #2;
      captured = d;
      en = ~en;               // capture edge
      if (en) rise_caps++; else fall_caps++;
      #1;
      checks++;
      if (q !== captured) begin
        failures++;
        $display("FAIL after %s edge: q=%h expected=%h", en ? "rising" : "falling", q, captured);
      end
      for (int j = 0; j < 3; j++) begin
        d = 8'($urandom);     // no edge: must be ignored
        #1;
        checks++;
        if (q !== captured) begin
          failures++;
          $display("FAIL q followed d between edges: q=%h expected=%h", q, captured);
        end
      end
    end
    checks++;
    if (rise_caps == 0 || fall_caps == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
