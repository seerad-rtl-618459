// seerad_sign_detector: first stage of the signed SEERAD divider.
//
// Takes the two's complement dividend and divisor and hands the unsigned
// magnitudes |A| and |B| to the rest of the datapath, together with the sign
// of the quotient (set when exactly one input is negative). The magnitudes are
// N-bit unsigned values, so |-2^(N-1)| = 2^(N-1) is represented exactly.
// The stage's role comes from the published block diagram; the conditional
// negation and XOR that realise it are this design's choice.
// Purely combinational.
module seerad_sign_detector #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] a,      // dividend, two's complement
  input  logic [N-1:0] b,      // divisor, two's complement
  output logic [N-1:0] a_abs,  // |A|, unsigned
  output logic [N-1:0] b_abs,  // |B|, unsigned
  output logic         sign    // quotient is negative
);

  always_comb begin
    a_abs = a[N-1] ? (~a + 1'b1) : a;
    b_abs = b[N-1] ? (~b + 1'b1) : b;
    sign  = a[N-1] ^ b[N-1];
  end

endmodule
