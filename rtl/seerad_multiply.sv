// seerad_multiply: forms D * |A| as a handful of shifted copies of |A|.
//
// Every D of an accuracy level is a constant, written in non-adjacent form
// (digits -1, 0, +1 with the fewest nonzero digits). Term t of the output is
// |A| shifted left by the position of the t-th nonzero digit of D, negated
// (two's complement) when that digit is -1, or zero when D has fewer digits.
// D is compared with each constant of the level, and the matching group's
// shift is selected, so each term is a small AND-OR mux of fixed shifts.
// NTERMS is 2, 2, 2 and 3 for levels 1 to 4, the shift-unit counts the
// published design gives. The terms are 2N bits wide and add up, modulo
// 2^(2N), to D * |A| (see seerad_adder). Purely combinational.
module seerad_multiply
  import seerad_pkg::*;
#(
  parameter int unsigned N         = 32,
  parameter int unsigned ACC_LEVEL = 4,
  localparam int unsigned L      = level_l(ACC_LEVEL),
  localparam int unsigned NTERMS = level_terms(ACC_LEVEL)
) (
  input  logic [N-1:0]   a,                    // |A|
  input  logic [L:0]     d,                    // D, one of the level's constants
  output logic [2*N-1:0] terms [NTERMS]        // partial products
);

  localparam int unsigned G = level_groups(ACC_LEVEL);

  logic [2*N-1:0] a_ext;
  logic [G-1:0]   hit;                  // d equals the D of group g
  logic [2*N-1:0] cand [G][NTERMS];     // term t of group g

  assign a_ext = {{N{1'b0}}, a};

  for (genvar g = 0; g < G; g++) begin : g_group
    localparam int unsigned DG = level_d(ACC_LEVEL, g);
    assign hit[g] = (d == (L + 1)'(DG));
    for (genvar t = 0; t < NTERMS; t++) begin : g_term
      localparam int POS = naf_term_pos(DG, t);
      localparam int DIG = (POS >= 0) ? naf_digit(DG, POS) : 0;
      if (POS < 0) begin : g_none
        assign cand[g][t] = '0;
      end else if (DIG < 0) begin : g_sub
        assign cand[g][t] = ~(a_ext << POS) + 1'b1;
      end else begin : g_add
        assign cand[g][t] = a_ext << POS;
      end
    end
  end

  always_comb begin
    for (int t = 0; t < int'(NTERMS); t++) begin
      terms[t] = '0;
      for (int g = 0; g < int'(G); g++)
        if (hit[g]) terms[t] = terms[t] | cand[g][t];
    end
  end

endmodule
