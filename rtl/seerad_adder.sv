// seerad_adder: sums the partial products of seerad_multiply.
//
// Adds NTERMS two's complement words of 2N bits, modulo 2^(2N). Since the
// terms encode D * |A| with D > 0, the sum is the non-negative product. The
// published design only names this block; a plain multi-operand sum is used
// and the adder architecture is left to synthesis. Purely combinational.
module seerad_adder #(
  parameter int unsigned N      = 32,
  parameter int unsigned NTERMS = 3
) (
  input  logic [2*N-1:0] terms [NTERMS],  // partial products
  output logic [2*N-1:0] sum              // D * |A|
);

  always_comb begin
    sum = '0;
    for (int unsigned t = 0; t < NTERMS; t++)
      sum = sum + terms[t];
  end

endmodule
