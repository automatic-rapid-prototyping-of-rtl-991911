// Self-checking testbench for mult_array_stage: the five stages chained
// without latches, for all 256 operand pairs, with both full adder mappings
// and with half adders in the constant-carry positions.
// After stage k the low product bits that the array finishes there must
// already equal those of a*b (bit 0 and 1 after stage 1, one more per
// carry-save row, bits 4 and 5 after stage 4), and after stage 5 all eight.
module tb_mult_array_stage;
  import ppl_mult_pkg::*;
  int checks = 0, failures = 0;
  logic [3:0] a, b;
  mult_stage_t w3m [STAGES + 1];
  mult_stage_t wfa [STAGES + 1];
  mult_stage_t wha [STAGES + 1];

  always_comb begin
    w3m[0] = '0; w3m[0].a = a; w3m[0].b = b;
    wfa[0] = '0; wfa[0].a = a; wfa[0].b = b;
    wha[0] = '0; wha[0].a = a; wha[0].b = b;
  end

  for (genvar s = 1; s <= STAGES; s++) begin : g_s
    mult_array_stage #(.STAGE(s), .STYLE(FA_THREE_MODULES)) u_3m (.d(w3m[s-1]), .q(w3m[s]));
    mult_array_stage #(.STAGE(s), .STYLE(FA_FA1B_INV))      u_fa (.d(wfa[s-1]), .q(wfa[s]));
    mult_array_stage #(.STAGE(s), .HALF_ADDERS(1'b1))       u_ha (.d(wha[s-1]), .q(wha[s]));
  end

  // Number of finished low product bits after each stage.
  function automatic int unsigned done_bits(int unsigned s);
    case (s)
      1: return 2;
      2: return 3;
      3: return 4;
      4: return 6;
      default: return 8;
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      logic [7:0] prod, mask;
      {a, b} = 8'(i);
      #1;
      prod = 8'(a) * 8'(b);
      for (int unsigned s = 1; s <= STAGES; s++) begin
        mask = 8'((16'd1 << done_bits(s)) - 1);
        checks += 3;
        if ((wha[s].s & mask) !== (prod & mask)) begin
          failures++;
          $display("FAIL half-adder a=%0d b=%0d stage %0d: s=%b product=%b", a, b, s, wha[s].s, prod);
        end
        if ((w3m[s].s & mask) !== (prod & mask)) begin
          failures++;
          $display("FAIL three-module a=%0d b=%0d stage %0d: s=%b product=%b", a, b, s, w3m[s].s, prod);
        end
        if ((wfa[s].s & mask) !== (prod & mask)) begin
          failures++;
          $display("FAIL fa1b a=%0d b=%0d stage %0d: s=%b product=%b", a, b, s, wfa[s].s, prod);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
