// seerad_pkg: constants and elaboration-time helpers shared by the SEERAD
// approximate divider.
//
// SEERAD replaces the divisor B by B_r = 2^(K+L)/D, where K is the position of
// the leading one of |B| and (L, D) are constants picked per "group" of
// divisors. A group is named by the ACC_LEVEL-1 bits just below the leading
// one, so accuracy level 1 has one group, level 2 two, level 3 four and level
// 4 eight. One L serves all groups of a level. The (L, D) values below are the
// published ones; they were chosen by exhaustive search for the lowest mean
// relative error and, among equals, the fewest nonzero signed digits.
//
// The multiplier by D is built from shifts: each D is written in its
// non-adjacent form (digits in {-1,0,1}, no two adjacent nonzero), which has
// the fewest nonzero digits. naf_digit() and naf_weight() give that form at
// elaboration, so no table of shift amounts is kept by hand.
package seerad_pkg;

  // L of an accuracy level (one L per level).
  function automatic int unsigned level_l(input int unsigned level);
    case (level)
      1:       return 3;
      2:       return 4;
      3:       return 5;
      default: return 7;
    endcase
  endfunction

  // Number of divisor groups of a level: 2^(level-1).
  function automatic int unsigned level_groups(input int unsigned level);
    return 1 << (level - 1);
  endfunction

  // D of group `idx` (the bits below the leading one, read as a binary number).
  function automatic int unsigned level_d(input int unsigned level, input int unsigned idx);
    case (level)
      1: return 5;
      2: case (idx)
           0: return 12;
           default: return 9;
         endcase
      3: case (idx)
           0: return 28;
           1: return 24;
           2: return 20;
           default: return 17;
         endcase
      default:
         case (idx)
           0: return 120;
           1: return 108;
           2: return 97;
           3: return 88;
           4: return 82;
           5: return 76;
           6: return 70;
           default: return 66;
         endcase
    endcase
  endfunction

  // Digit `pos` (-1, 0 or +1) of the non-adjacent form of d.
  function automatic int naf_digit(input int unsigned d, input int unsigned pos);
    int v;
    int z;
    v = int'(d);
    z = 0;
    for (int unsigned i = 0; i <= pos; i++) begin
      if (v % 2 != 0) begin
        z = 2 - (v % 4);
        v = v - z;
      end else begin
        z = 0;
      end
      v = v / 2;
    end
    return z;
  endfunction

  // Number of nonzero digits in the non-adjacent form of d.
  function automatic int unsigned naf_weight(input int unsigned d);
    int unsigned w;
    w = 0;
    for (int unsigned i = 0; i < 16; i++)
      if (naf_digit(d, i) != 0) w++;
    return w;
  endfunction

  // Position of the t-th nonzero NAF digit of d (t counts from 0, from the
  // least significant end), or -1 when d has no such digit.
  function automatic int naf_term_pos(input int unsigned d, input int unsigned t);
    int unsigned n;
    n = 0;
    for (int unsigned i = 0; i < 16; i++)
      if (naf_digit(d, i) != 0) begin
        if (n == t) return int'(i);
        n++;
      end
    return -1;
  endfunction

  // Largest NAF weight over the groups of a level: the number of shift units
  // the Multiply stage needs (2, 2, 2 and 3 for levels 1..4).
  function automatic int unsigned level_terms(input int unsigned level);
    int unsigned m;
    m = 0;
    for (int unsigned g = 0; g < level_groups(level); g++)
      if (naf_weight(level_d(level, g)) > m) m = naf_weight(level_d(level, g));
    return m;
  endfunction

  // Width of the group index port (at least one bit, also for level 1).
  function automatic int unsigned index_width(input int unsigned level);
    return (level > 1) ? level - 1 : 1;
  endfunction

endpackage
