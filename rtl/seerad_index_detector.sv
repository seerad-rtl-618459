// seerad_index_detector: finds the divisor group and its constant D.
//
// At accuracy level ACC_LEVEL the divisors are split into 2^(ACC_LEVEL-1)
// groups by the ACC_LEVEL-1 bits that follow the leading one of |B|. Each
// index bit is an AND-OR over all bit positions: bit j of the index (counted
// from the most significant) is OR over i of B_f[i] & B[i-1-j], so the one-hot
// B_f picks the bits just below the leading one without a shifter. Bits that
// would lie below B[0] read as 0. The index then selects the group's D from
// the published table (seerad_pkg::level_d); at level 1 there is a single
// group and D is constant.
// The group rule and D values follow the published design; the AND-OR form is
// its index equation generalised to any level. D is L+1 bits wide at every
// level; bits that no D of the level uses come out as constants (at level 4
// bit 7 is always 0 and bit 6 always 1). Purely combinational.
module seerad_index_detector
  import seerad_pkg::*;
#(
  parameter int unsigned N         = 32,
  parameter int unsigned ACC_LEVEL = 4,
  localparam int unsigned L  = level_l(ACC_LEVEL),
  localparam int unsigned IW = index_width(ACC_LEVEL)
) (
  input  logic [N-1:0]  b,      // |B|
  input  logic [N-1:0]  bf,     // B_f from seerad_rounding (one-hot or zero)
  output logic [IW-1:0] index,  // group index
  output logic [L:0]    d       // D of the group
);

  localparam int NB = int'(ACC_LEVEL) - 1;  // bits read below the leading one

  always_comb begin
    index = '0;
    for (int j = 0; j < NB; j++)
      for (int i = j + 1; i < int'(N); i++)
        index[NB-1-j] = index[NB-1-j] | (bf[i] & b[i-1-j]);
  end

  always_comb d = (L + 1)'(level_d(ACC_LEVEL, int'(index)));

endmodule
