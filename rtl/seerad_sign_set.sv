// seerad_sign_set: last stage of the signed SEERAD divider.
//
// Gives the unsigned quotient its sign: when exactly one of the inputs was
// negative the magnitude is negated (two's complement, so the result is the
// exact negative), otherwise it passes unchanged. The published design says
// the result is "complemented"; two's complement is this design's reading.
// Purely combinational.
module seerad_sign_set #(
  parameter int unsigned W = 71   // 2N+L of the default divider
) (
  input  logic [W-1:0] mag,   // unsigned quotient
  input  logic         sign,  // negate
  output logic [W-1:0] q      // signed quotient
);

  always_comb q = sign ? (~mag + 1'b1) : mag;

endmodule
