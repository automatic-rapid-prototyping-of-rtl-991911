// Self-checking testbench for ppl_full_adder: both mappings (three basic
// modules, and FA1B plus inverter) over all eight input combinations,
// checked against integer addition with the cell's active-low carries and
// inverted sum.
module tb_ppl_full_adder;
  import ppl_mult_pkg::*;
  int checks = 0, failures = 0;
  logic a, b, ci_n;
  logic co_n_3m, sum_n_3m, co_n_fa, sum_n_fa;

  ppl_full_adder #(.STYLE(FA_THREE_MODULES)) dut_3m (
    .a(a), .b(b), .ci_n(ci_n), .co_n(co_n_3m), .sum_n(sum_n_3m)
  );
  ppl_full_adder #(.STYLE(FA_FA1B_INV)) dut_fa1b (
    .a(a), .b(b), .ci_n(ci_n), .co_n(co_n_fa), .sum_n(sum_n_fa)
  );

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      int total;
      {a, b, ci_n} = 3'(i);
      #1;
      total = int'(a) + int'(b) + int'(!ci_n);
      checks += 4;
      if (co_n_3m  !== !(total >= 2)) begin failures++; $display("FAIL 3m co_n i=%0d", i); end
      if (sum_n_3m !== !(total % 2))  begin failures++; $display("FAIL 3m sum_n i=%0d", i); end
      if (co_n_fa  !== !(total >= 2)) begin failures++; $display("FAIL fa1b co_n i=%0d", i); end
      if (sum_n_fa !== !(total % 2))  begin failures++; $display("FAIL fa1b sum_n i=%0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
