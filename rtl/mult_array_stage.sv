// Combinational logic of one pipeline stage of the 4x4 array multiplier.
//
// Product column k collects the partial products a[j] & b[i] with i + j = k.
// The five stages, selected by STAGE, are:
//   1: adds row b[0]·A to row b[1]·A in columns 1..3 (three adders with carry
//      in 0); column 0 is a[0]&b[0], column 4 takes a[3]&b[1].
//   2: adds row b[2]·A into columns 2..4; column 5 takes a[3]&b[2].
//   3: adds row b[3]·A into columns 3..5; column 6 takes a[3]&b[3].
//      Stages 1-3 are carry-save rows: each adder's carry goes to the next
//      column of the next stage, and one more product bit is final per row.
//   4: first half of the carry-propagate adder: columns 4 and 5, rippling,
//      with the carry out of column 5 held in the rc field.
//   5: second half: column 6 adds its sum, its carry and rc; the carry out
//      is product bit 7.
// That gives twelve one-bit adders, three per row in stages 1-3, two in
// stage 4 and one in stage 5. Every adder is a ppl_full_adder; as in the
// original cell library it is used also where a half adder would do, with a
// constant carry in. With HALF_ADDERS set, those constant-carry positions
// (stage 1 and column 4 of stage 4) use ppl_half_adder instead, one of the
// optimised mappings the document proposes. Active-low carries and inverted
// sums are converted at the adder's pins.
//
// Operands and finished product bits pass through unchanged. Purely
// combinational; the latch ranks are outside.
module mult_array_stage
  import ppl_mult_pkg::*;
#(
  parameter int unsigned STAGE = 1,
  parameter fa_style_e   STYLE = FA_THREE_MODULES,
  parameter bit          HALF_ADDERS = 1'b0
) (
  input  mult_stage_t d,
  output mult_stage_t q
);

  // Adder operands and results, one set per adder of this stage (at most 3).
  logic [2:0] fa_x, fa_y, fa_ci, fa_s, fa_co;

  // Adders whose carry in is the constant 0: all of stage 1, and column 4
  // of stage 4. With HALF_ADDERS they become ppl_half_adder cells.
  function automatic bit constant_carry(int unsigned stage, int unsigned i);
    return (stage == 1) || (stage == 4 && i == 0);
  endfunction

  for (genvar i = 0; i < 3; i++) begin : g_fa
    logic co_n, sum_n;
    if (HALF_ADDERS && constant_carry(STAGE, i)) begin : g_ha
      ppl_half_adder u_ha (
        .a(fa_x[i]), .b(fa_y[i]), .co_n(co_n), .sum_n(sum_n)
      );
    end else begin : g_full
      ppl_full_adder #(.STYLE(STYLE)) u_fa (
        .a(fa_x[i]), .b(fa_y[i]), .ci_n(~fa_ci[i]),
        .co_n(co_n), .sum_n(sum_n)
      );
    end
    assign fa_s[i]  = ~sum_n;
    assign fa_co[i] = ~co_n;
  end

  // Each stage is its own generate branch, so only the chosen one's column
  // indices are elaborated.
  if (STAGE == 1) begin : g_row1
    always_comb begin
      q     = d;
      q.c   = '0;
      q.rc  = 1'b0;
      q.s   = '0;
      fa_ci = '0;
      q.s[0] = d.a[0] & d.b[0];
      for (int k = 1; k <= 3; k++) begin
        fa_x[k-1] = d.a[k] & d.b[0];
        fa_y[k-1] = d.a[k-1] & d.b[1];
        q.s[k]    = fa_s[k-1];
        q.c[k+1]  = fa_co[k-1];
      end
      q.s[4] = d.a[3] & d.b[1];
    end
  end else if (STAGE == 2 || STAGE == 3) begin : g_row23
    always_comb begin
      q    = d;
      q.c  = '0;
      q.rc = 1'b0;
      for (int k = 0; k < 3; k++) begin
        fa_x[k]  = d.s[STAGE+k];
        fa_y[k]  = d.c[STAGE+k];
        fa_ci[k] = d.a[k] & d.b[STAGE];
        q.s[STAGE+k]   = fa_s[k];
        q.c[STAGE+k+1] = fa_co[k];
      end
      q.s[STAGE+3] = d.a[3] & d.b[STAGE];
    end
  end else if (STAGE == 4) begin : g_cpa_low
    always_comb begin
      q      = d;
      q.c    = '0;
      q.c[6] = d.c[6];
      fa_x  = '0;
      fa_y  = '0;
      fa_ci = '0;
      fa_x[0]  = d.s[4];
      fa_y[0]  = d.c[4];
      fa_x[1]  = d.s[5];
      fa_y[1]  = d.c[5];
      fa_ci[1] = fa_co[0];
      q.s[4] = fa_s[0];
      q.s[5] = fa_s[1];
      q.rc   = fa_co[1];
    end
  end else begin : g_cpa_high
    always_comb begin
      q     = d;
      q.c   = '0;
      q.rc  = 1'b0;
      fa_x  = '0;
      fa_y  = '0;
      fa_ci = '0;
      fa_x[0]  = d.s[6];
      fa_y[0]  = d.c[6];
      fa_ci[0] = d.rc;
      q.s[6] = fa_s[0];
      q.s[7] = fa_co[0];
    end
  end

endmodule
