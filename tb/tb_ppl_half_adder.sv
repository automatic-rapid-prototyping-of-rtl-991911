// Self-checking testbench for ppl_half_adder: all four input combinations
// against integer addition, with the cell's active-low carry and inverted
// sum.
module tb_ppl_half_adder;
  int checks = 0, failures = 0;
  logic a, b, co_n, sum_n;

  ppl_half_adder dut (.a(a), .b(b), .co_n(co_n), .sum_n(sum_n));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      int total;
      {a, b} = 2'(i);
      #1;
      total = int'(a) + int'(b);
      checks += 2;
      if (co_n  !== !(total >= 2)) begin failures++; $display("FAIL co_n a=%b b=%b", a, b); end
      if (sum_n !== !(total % 2))  begin failures++; $display("FAIL sum_n a=%b b=%b", a, b); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
