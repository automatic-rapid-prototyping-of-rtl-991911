// Self-checking testbench for act1_logic_module: applies all 256 input
// combinations and compares OUT with the module's published function, OR of
// SEL0/SEL1 choosing between the A and B multiplexers.
module tb_act1_logic_module;
  int checks = 0, failures = 0;
  logic [7:0] v;
  logic out, exp_out;

  act1_logic_module dut (
    .a0(v[0]), .a1(v[1]), .sela(v[2]), .b0(v[3]), .b1(v[4]), .selb(v[5]),
    .sel0(v[6]), .sel1(v[7]), .out(out)
  );

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      v = 8'(i);
      #1;
      if (v[6] || v[7]) exp_out = v[5] ? v[4] : v[3];
      else              exp_out = v[2] ? v[1] : v[0];
      checks++;
      if (out !== exp_out) begin
        failures++;
        $display("FAIL inputs=%b out=%b expected=%b", v, out, exp_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
