// seerad_rounding: rounds the divisor magnitude down to a power of two.
//
// The output B_f keeps only the most significant 1 of B, so B_f = 2^K with
// K = floor(log2 B); it is all zeros when B is zero. As in the published gate
// diagram, the circuit is a ripple chain from the top bit down: a "one seen
// above" signal starts at B[N-1], each stage passes its own bit to B_f only
// while that signal is low, and ORs its bit into the signal for the stage below.
// Purely combinational; the delay grows linearly with N.
module seerad_rounding #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] b,   // |B|
  output logic [N-1:0] bf   // B_f, one-hot at the leading one of b (0 if b == 0)
);

  logic [N-1:0] seen;  // seen[i]: some bit at position >= i is 1

  always_comb begin
    seen[N-1] = b[N-1];
    bf[N-1]   = b[N-1];
    for (int i = N - 2; i >= 0; i--) begin
      bf[i]   = b[i] & ~seen[i+1];
      seen[i] = b[i] | seen[i+1];
    end
  end

endmodule
