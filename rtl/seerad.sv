// seerad: rounding-based approximate divider (SEERAD), combinational.
//
// The divisor B is replaced by B_r = 2^(K+L)/D, where 2^K is B rounded down to
// a power of two and D, L are constants of the divisor's group, so that
//     A / B  ~=  D * A / 2^(K+L).
// The division thus becomes a multiplication by a small constant, done with
// two or three shifted adds, and a right shift. The datapath follows the
// published block diagram:
//   sign detector -> rounding (B_f = 2^K) -> index detector (group, D)
//   -> multiply (shifted |A| terms) -> adder (D*|A|) -> shifter (/2^(K+L))
//   -> sign set.
// ACC_LEVEL (1..4) sets the number of groups, 2^(ACC_LEVEL-1); higher levels
// are more accurate (worst-case error 37.5 %, 25 %, 12.5 %, 6.25 %) and
// larger. With SIGNED = 0 the inputs are unsigned and the sign stages are
// left out, as the published design allows.
//
// Interface: a, b are N-bit (two's complement when SIGNED). q is a fixed-point
// number of 2N+L bits with N+L fraction bits: q = D*|A| / 2^(K+L), exact, with
// the sign applied in two's complement when SIGNED. div_by_zero is set when
// b is zero; q is then 0 (this design's choice; the published design does not
// cover it). There are no registers: the quotient follows the inputs after
// the combinational delay.
module seerad
  import seerad_pkg::*;
#(
  parameter int unsigned N         = 32,
  parameter int unsigned ACC_LEVEL = 4,
  parameter bit          SIGNED    = 1'b1,
  localparam int unsigned L  = level_l(ACC_LEVEL),
  localparam int unsigned QW = 2 * N + L
) (
  input  logic [N-1:0]  a,            // dividend
  input  logic [N-1:0]  b,            // divisor
  output logic [QW-1:0] q,            // quotient, N+L fraction bits
  output logic          div_by_zero   // b == 0
);

  localparam int unsigned NTERMS = level_terms(ACC_LEVEL);
  localparam int unsigned IW     = index_width(ACC_LEVEL);

  if (ACC_LEVEL < 1 || ACC_LEVEL > 4) begin : g_bad_level
    $error("seerad: ACC_LEVEL must be 1 to 4");
  end
  if (N < L + 1) begin : g_bad_width
    $error("seerad: N must exceed L");
  end

  logic [N-1:0]   a_abs, b_abs, bf;
  logic           sign;
  logic [IW-1:0]  index;
  logic [L:0]     d;
  logic [2*N-1:0] terms [NTERMS];
  logic [2*N-1:0] prod;
  logic [QW-1:0]  mag;

  if (SIGNED) begin : g_sign_in
    seerad_sign_detector #(.N(N)) u_sign_detector (
      .a(a), .b(b), .a_abs(a_abs), .b_abs(b_abs), .sign(sign)
    );
  end else begin : g_unsigned_in
    assign a_abs = a;
    assign b_abs = b;
    assign sign  = 1'b0;
  end

  seerad_rounding #(.N(N)) u_rounding (.b(b_abs), .bf(bf));

  seerad_index_detector #(.N(N), .ACC_LEVEL(ACC_LEVEL)) u_index_detector (
    .b(b_abs), .bf(bf), .index(index), .d(d)
  );

  seerad_multiply #(.N(N), .ACC_LEVEL(ACC_LEVEL)) u_multiply (
    .a(a_abs), .d(d), .terms(terms)
  );

  seerad_adder #(.N(N), .NTERMS(NTERMS)) u_adder (.terms(terms), .sum(prod));

  seerad_shifter #(.N(N), .ACC_LEVEL(ACC_LEVEL)) u_shifter (
    .p(prod), .bf(bf), .q(mag)
  );

  if (SIGNED) begin : g_sign_out
    seerad_sign_set #(.W(QW)) u_sign_set (.mag(mag), .sign(sign), .q(q));
  end else begin : g_unsigned_out
    assign q = mag;
  end

  assign div_by_zero = (b == '0);

  // The group index is only observed through D.
  logic unused_index;
  assign unused_index = ^index;

endmodule
