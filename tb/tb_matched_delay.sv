// Self-checking testbench for matched_delay: every transition of in must
// appear at out exactly DELAY time units later.
module tb_matched_delay;
  localparam int unsigned DELAY = 7;
  int checks = 0, failures = 0;
  logic in, out;

  matched_delay #(.DELAY(DELAY)) dut (.in(in), .out(out));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in = 1'b0;
    #20;
    for (int i = 0; i < 20; i++) begin
      in = ~in;
      #(DELAY - 1);
      checks++;
      if (out === in) begin failures++; $display("FAIL transition %0d arrived early", i); end
      #1;
      checks++;
      if (out !== in) begin failures++; $display("FAIL transition %0d late", i); end
      #($urandom_range(2, 10));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
