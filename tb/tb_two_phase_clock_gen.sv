// Self-checking testbench for two_phase_clock_gen with a 24-unit clock and
// unit gate delays. Checked:
//  - the phases are never high together;
//  - each phase pulses once per clock period;
//  - the edge times worked out by hand from the gate structure: after clk
//    rises phi0 falls 4 gate delays later and phi1 rises 3 later still;
//    after clk falls phi1 falls 3 gate delays later and phi0 rises 2 later;
//  - the complement outputs are exact in mid-phase.
module tb_two_phase_clock_gen;
  localparam int unsigned D = 1;
  int checks = 0, failures = 0;
  int n_phi0 = 0, n_phi1 = 0;
  time t_clk_rise = 0, t_clk_fall = 0;
  bit  armed = 1'b0;
  logic clk = 1'b0;
  logic phi0, phi0_n, phi1, phi1_n;

  two_phase_clock_gen #(.GATE_DELAY(D)) dut (
    .clk(clk), .phi0(phi0), .phi0_n(phi0_n), .phi1(phi1), .phi1_n(phi1_n)
  );

  initial begin
    #50000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_edge(input time t, input time ref_t, input time exp, input string what);
    if (!armed) return;
    checks++;
    if (t - ref_t != exp) begin
      failures++;
      $display("FAIL %s %0t after the clock edge, expected %0t", what, t - ref_t, exp);
    end
  endtask

  always #12 clk = ~clk;
  always @(posedge clk) t_clk_rise = $time;
  always @(negedge clk) t_clk_fall = $time;
  always @(negedge phi0) check_edge($time, t_clk_rise, 4 * D, "phi0 fall");
  always @(posedge phi1) begin
    if (armed) n_phi1++;
    check_edge($time, t_clk_rise, 7 * D, "phi1 rise");
  end
  always @(negedge phi1) check_edge($time, t_clk_fall, 3 * D, "phi1 fall");
  always @(posedge phi0) begin
    if (armed) n_phi0++;
    check_edge($time, t_clk_fall, 5 * D, "phi0 rise");
  end

  initial begin
    #100;  // settle from the random initial state
    @(posedge clk);
    armed = 1'b1;
    for (int t = 0; t < 24 * 40; t++) begin
      #1;
      checks++;
      if (phi0 && phi1) begin failures++; $display("FAIL overlap at %0t", $time); end
    end
    checks += 2;
    if (n_phi0 != 40) begin failures++; $display("FAIL phi0 pulses %0d", n_phi0); end
    if (n_phi1 != 40) begin failures++; $display("FAIL phi1 pulses %0d", n_phi1); end
    @(posedge clk); #10;
    checks += 2;
    if (phi0_n !== ~phi0 || phi1_n !== ~phi1) begin failures++; $display("FAIL complements"); end
    if (!(phi1 && !phi0)) begin failures++; $display("FAIL phi1 not high late in clk-high"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
