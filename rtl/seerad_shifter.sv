// seerad_shifter: divides the product D*|A| by 2^(K+L) without losing bits.
//
// The result is a fixed-point number with N integer bits and N+L fraction
// bits (2N+L bits in all). Division by 2^L is only the position of the binary
// point: the product is placed so that its bit L lands on the units bit when
// K = 0. Division by 2^K is a right shift by K in a logarithmic barrel
// shifter; K is encoded from the one-hot B_f by OR-ing the bit positions.
// Because D < 2^L, only the low N+L bits of the product can be set, and
// because K < N no bit is shifted out, so the output is exact.
// When B_f is zero (the divisor is zero) the output is forced to zero; that
// case is this design's own choice. Purely combinational.
module seerad_shifter
  import seerad_pkg::*;
#(
  parameter int unsigned N         = 32,
  parameter int unsigned ACC_LEVEL = 4,
  localparam int unsigned L  = level_l(ACC_LEVEL),
  localparam int unsigned QW = 2 * N + L
) (
  input  logic [2*N-1:0] p,   // D * |A|
  input  logic [N-1:0]   bf,  // B_f, one-hot or zero
  output logic [QW-1:0]  q    // D*|A| / 2^(K+L), N+L fraction bits
);

  localparam int unsigned KW = (N > 1) ? $clog2(N) : 1;

  logic [KW-1:0] k;
  logic [QW-1:0] stage [KW+1];

  // Bits N+L and up of the product are always zero (D < 2^L).
  logic unused_p_hi;
  assign unused_p_hi = ^p[2*N-1:N+L];

  // One-hot to binary: bit s of K is the OR of B_f over positions with bit s set.
  always_comb begin
    k = '0;
    for (int unsigned i = 0; i < N; i++)
      if (bf[i]) k = k | KW'(i);
  end

  always_comb begin
    stage[0] = {p[N+L-1:0], {N{1'b0}}};
    for (int unsigned s = 0; s < KW; s++)
      stage[s+1] = k[s] ? (stage[s] >> (1 << s)) : stage[s];
    q = (bf == '0) ? '0 : stage[KW];
  end

endmodule
