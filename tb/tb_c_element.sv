// Self-checking testbench for c_element: random input sequences against a
// reference state (set when both inputs high, cleared when both low, held
// otherwise), plus reset, and out_n as the complement.
module tb_c_element;
  int checks = 0, failures = 0, holds = 0;
  logic reset, i1, i2, out, out_n, model;

  c_element dut (.reset(reset), .i1(i1), .i2(i2), .out(out), .out_n(out_n));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1'b1; i1 = 1'b1; i2 = 1'b1; model = 1'b0;
    #1;
    checks++;
    if (out !== 1'b0) begin failures++; $display("FAIL reset: out=%b", out); end
    reset = 1'b0;
    i1 = 1'b0; i2 = 1'b0;
    #1;
    for (int i = 0; i < 400; i++) begin
      if ($urandom_range(0, 1)) i1 = ~i1; else i2 = ~i2;
      if (i1 == i2) model = i1; else holds++;
      if (i == 200) begin
        reset = 1'b1; model = 1'b0;
      end else if (i == 203) begin
        reset = 1'b0;
        if (i1 == i2) model = i1;
      end
      #1;
      checks += 2;
      if (out !== model) begin
        failures++;
        $display("FAIL step %0d: i1=%b i2=%b out=%b expected=%b", i, i1, i2, out, model);
      end
      if (out_n !== ~out) begin failures++; $display("FAIL out_n at step %0d", i); end
    end
    checks++;
    if (holds == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
