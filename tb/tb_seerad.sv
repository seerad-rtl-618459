// tb_seerad: end-to-end test of the SEERAD divider at N = 32 in all eight
// configurations (accuracy levels 1 to 4, signed and unsigned), fed the same
// operands. Each quotient is compared bit for bit with the reference model,
// and div_by_zero with b == 0. The test counts how often each mechanism of
// the design was exercised and fails if one never was: every divisor group of
// every level, every leading-one position K, a negated quotient (one negative
// input), two negative inputs, the most negative input, a zero divisor, an
// unsigned operand above the signed range and a subtracting shift term
// (D = 28 at level 3, or 120, 108, 97, 76 or 70 at level 4).
// The divider is combinational, so each result is read 1 ns after the inputs
// change, in the same cycle.
module tb_seerad;
  import seerad_ref_pkg::*;
  localparam int N = 32;
  localparam int NCFG = 8;

  logic [N-1:0] a, b;
  logic [127:0] q [NCFG];
  logic         dz [NCFG];
  logic         clk = 1'b0;
  int checks = 0, failures = 0;

  // Configuration c: level = c % 4 + 1, signed when c < 4.
  logic [2*N+3-1:0] q_s1, q_u1;
  logic [2*N+4-1:0] q_s2, q_u2;
  logic [2*N+5-1:0] q_s3, q_u3;
  logic [2*N+7-1:0] q_s4, q_u4;

  seerad #(.N(N), .ACC_LEVEL(1), .SIGNED(1'b1)) u_s1 (.a(a), .b(b), .q(q_s1), .div_by_zero(dz[0]));
  seerad #(.N(N), .ACC_LEVEL(2), .SIGNED(1'b1)) u_s2 (.a(a), .b(b), .q(q_s2), .div_by_zero(dz[1]));
  seerad #(.N(N), .ACC_LEVEL(3), .SIGNED(1'b1)) u_s3 (.a(a), .b(b), .q(q_s3), .div_by_zero(dz[2]));
  seerad #(.N(N), .ACC_LEVEL(4), .SIGNED(1'b1)) u_s4 (.a(a), .b(b), .q(q_s4), .div_by_zero(dz[3]));
  seerad #(.N(N), .ACC_LEVEL(1), .SIGNED(1'b0)) u_u1 (.a(a), .b(b), .q(q_u1), .div_by_zero(dz[4]));
  seerad #(.N(N), .ACC_LEVEL(2), .SIGNED(1'b0)) u_u2 (.a(a), .b(b), .q(q_u2), .div_by_zero(dz[5]));
  seerad #(.N(N), .ACC_LEVEL(3), .SIGNED(1'b0)) u_u3 (.a(a), .b(b), .q(q_u3), .div_by_zero(dz[6]));
  seerad #(.N(N), .ACC_LEVEL(4), .SIGNED(1'b0)) u_u4 (.a(a), .b(b), .q(q_u4), .div_by_zero(dz[7]));

  assign q[0] = 128'(q_s1);
  assign q[1] = 128'(q_s2);
  assign q[2] = 128'(q_s3);
  assign q[3] = 128'(q_s4);
  assign q[4] = 128'(q_u1);
  assign q[5] = 128'(q_u2);
  assign q[6] = 128'(q_u3);
  assign q[7] = 128'(q_u4);

  // Mechanism counters.
  int group_hits [4][8];
  int k_hits [N];
  int n_negate = 0, n_both_neg = 0, n_min_neg = 0, n_zero_div = 0, n_big_unsigned = 0, n_subtract = 0;

  always #5 clk = ~clk;
  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [N-1:0] ta, input logic [N-1:0] tb_);
    @(negedge clk);
    a = ta; b = tb_;
    #1;
    for (int c = 0; c < NCFG; c++) begin
      int  level = c % 4 + 1;
      bit  sgn   = (c < 4);
      logic [127:0] exp = ref_q(level, N, sgn, 64'(ta), 64'(tb_));
      logic [63:0]  bm  = ref_abs(64'(tb_), N, sgn);
      checks++;
      if (q[c] !== exp || dz[c] !== (tb_ == '0)) begin
        failures++;
        $display("FAIL cfg %0d a=%h b=%h q=%h exp=%h dz=%b", c, ta, tb_, q[c], exp, dz[c]);
      end
      if (bm != 0) begin
        int idx = ref_index(bm, N, level);
        int d   = ref_d(level, idx);
        group_hits[level-1][idx]++;
        if (sgn && level == 4) k_hits[ref_k(bm, N)]++;
        if ((level == 3 && d == 28) || (level == 4 && (d == 120 || d == 108 || d == 97 || d == 76 || d == 70)))
          n_subtract++;
        if (sgn && level == 4 && (ta[N-1] ^ tb_[N-1]) && exp != 0) n_negate++;
        if (sgn && level == 4 && ta[N-1] && tb_[N-1]) n_both_neg++;
        if (sgn && level == 4 && (ta == {1'b1, {(N-1){1'b0}}} || tb_ == {1'b1, {(N-1){1'b0}}})) n_min_neg++;
        if (!sgn && level == 4 && (ta[N-1] || tb_[N-1])) n_big_unsigned++;
      end else if (c == 0) begin
        n_zero_div++;
      end
    end
  endtask

  task automatic need(input string what, input int count);
    checks++;
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end else begin
      $display("  %-28s %0d", what, count);
    end
  endtask

  initial begin
    logic [N-1:0] ra, rb;
    foreach (group_hits[i, j]) group_hits[i][j] = 0;
    foreach (k_hits[i]) k_hits[i] = 0;
    a = '0; b = '0;
    // Directed: zero divisor, extreme values, small divisors.
    apply(32'd1000, 32'd0);
    apply(32'h8000_0000, 32'h8000_0000);
    apply(32'h7FFF_FFFF, 32'd1);
    apply(32'h8000_0000, 32'd3);
    apply(-32'sd1000, 32'd10);
    apply(32'd1000, -32'sd10);
    apply(-32'sd1000, -32'sd10);
    // Every group pattern at every divisor magnitude.
    for (int k = 0; k < N; k++)
      for (int p = 0; p < 8; p++)
        apply($urandom, (N'(1) << k) | ((N'(p) << k) >> 3));
    // Random operands, random divisor size and signs.
    repeat (20000) begin
      ra = $urandom;
      rb = N'($urandom) >> ($urandom % N);
      if ($urandom % 2 == 0) rb = -rb;
      if ($urandom % 16 == 0) ra = {1'b1, {(N-1){1'b0}}};
      apply(ra, rb);
    end
    $display("Mechanisms exercised:");
    for (int l = 1; l <= 4; l++)
      for (int g = 0; g < (1 << (l - 1)); g++)
        need($sformatf("level %0d group %0d", l, g), group_hits[l-1][g]);
    for (int k = 0; k < N; k++) need($sformatf("leading one K=%0d", k), k_hits[k]);
    need("negated quotient", n_negate);
    need("both inputs negative", n_both_neg);
    need("most negative input", n_min_neg);
    need("zero divisor", n_zero_div);
    need("unsigned above signed range", n_big_unsigned);
    need("subtracting shift term", n_subtract);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
