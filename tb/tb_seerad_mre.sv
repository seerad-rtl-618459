// tb_seerad_mre: accuracy of the SEERAD divider against its published error
// figures. For unsigned dividers at accuracy levels 1 to 4 it measures the
// mean relative error |q - A/B| / (A/B) and the largest relative error:
//   8 bits:  every A and B from 1 to 255 (exhaustive),
//   16 bits: every B from 1 to 65535, each with a random nonzero A,
//   32 bits: 40000 random B, each with a random nonzero A.
// Expected mean errors (per cent) are 16.55, 9.15, 4.66, 2.42 at 8 bits and
// 16.25, 8.77, 4.55, 2.20 at 16 and 32 bits; the worst case is
// 1 - Dmax / 2^L = 37.5, 25, 12.5 and 6.25 per cent. The exhaustive sweeps must
// match to within 0.01 points (the published figures are rounded to 0.01);
// the 32-bit sample, whose B are mostly large, to within 0.1 points.
module tb_seerad_mre;
  import seerad_ref_pkg::*;
  logic clk = 1'b0;
  int checks = 0, failures = 0;

  logic [7:0]  a8,  b8;
  logic [15:0] a16, b16;
  logic [31:0] a32, b32;

  logic [127:0] q8 [4], q16 [4], q32 [4];
  logic         unused_dz [12];

  for (genvar l = 1; l <= 4; l++) begin : g_lvl
    localparam int LL = (l == 1) ? 3 : (l == 2) ? 4 : (l == 3) ? 5 : 7;
    logic [2*8+LL-1:0]  o8;
    logic [2*16+LL-1:0] o16;
    logic [2*32+LL-1:0] o32;
    seerad #(.N(8),  .ACC_LEVEL(l), .SIGNED(1'b0)) u8  (.a(a8),  .b(b8),  .q(o8),  .div_by_zero(unused_dz[3*(l-1)]));
    seerad #(.N(16), .ACC_LEVEL(l), .SIGNED(1'b0)) u16 (.a(a16), .b(b16), .q(o16), .div_by_zero(unused_dz[3*(l-1)+1]));
    seerad #(.N(32), .ACC_LEVEL(l), .SIGNED(1'b0)) u32 (.a(a32), .b(b32), .q(o32), .div_by_zero(unused_dz[3*(l-1)+2]));
    assign q8[l-1]  = 128'(o8);
    assign q16[l-1] = 128'(o16);
    assign q32[l-1] = 128'(o32);
  end

  real sum8 [4], sum16 [4], sum32 [4], max8 [4], max16 [4], max32 [4];
  int  cnt8 = 0, cnt16 = 0, cnt32 = 0;

  always #5 clk = ~clk;
  initial begin
    repeat (10000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real rel_err(input logic [127:0] q, input int n, input int level,
                                  input longint av, input longint bv);
    real exact = real'(av) / real'(bv);
    real e = (ref_real(q, n, level, 1'b0) - exact) / exact;
    return e < 0.0 ? -e : e;
  endfunction

  task automatic compare(input string what, input int level, input real got, input real exp, input real tol);
    checks++;
    if (got - exp > tol || exp - got > tol) begin
      failures++;
      $display("FAIL %s level %0d: %.3f %%, expected %.3f %%", what, level, got, exp);
    end else begin
      $display("  %s level %0d: %.3f %% (published %.2f %%)", what, level, got, exp);
    end
  endtask

  initial begin
    real mre8 [4]  = '{16.55, 9.15, 4.66, 2.42};
    real mre16 [4] = '{16.25, 8.77, 4.55, 2.20};
    real maxe [4]  = '{37.5, 25.0, 12.5, 6.25};
    real e;
    int av16;
    longint unsigned av, bv;
    for (int l = 0; l < 4; l++) begin
      sum8[l] = 0.0; sum16[l] = 0.0; sum32[l] = 0.0;
      max8[l] = 0.0; max16[l] = 0.0; max32[l] = 0.0;
    end
    for (int av = 1; av < 256; av++)
      for (int bv = 1; bv < 256; bv++) begin
        a8 = 8'(av); b8 = 8'(bv);
        #1;
        for (int l = 0; l < 4; l++) begin
          e = rel_err(q8[l], 8, l + 1, longint'(av), longint'(bv));
          sum8[l] += e;
          if (e > max8[l]) max8[l] = e;
        end
        cnt8++;
      end
    for (int bv = 1; bv < 65536; bv++) begin
      av16 = 1 + int'($urandom % 65535);
      a16 = 16'(av16); b16 = 16'(bv);
      #1;
      for (int l = 0; l < 4; l++) begin
        e = rel_err(q16[l], 16, l + 1, longint'(av16), longint'(bv));
        sum16[l] += e;
        if (e > max16[l]) max16[l] = e;
      end
      cnt16++;
    end
    repeat (40000) begin
      av = 1 + longint'($urandom % 32'hFFFF_FFFF);
      bv = 1 + longint'($urandom % 32'hFFFF_FFFF);
      a32 = 32'(av); b32 = 32'(bv);
      #1;
      for (int l = 0; l < 4; l++) begin
        e = rel_err(q32[l], 32, l + 1, longint'(av), longint'(bv));
        sum32[l] += e;
        if (e > max32[l]) max32[l] = e;
      end
      cnt32++;
    end
    for (int l = 0; l < 4; l++) begin
      compare("8-bit MRE ", l + 1, 100.0 * sum8[l] / cnt8, mre8[l], 0.01);
      compare("16-bit MRE", l + 1, 100.0 * sum16[l] / cnt16, mre16[l], 0.01);
      compare("32-bit MRE", l + 1, 100.0 * sum32[l] / cnt32, mre16[l], 0.1);
      compare("8-bit max ", l + 1, 100.0 * max8[l], maxe[l], 1e-6);
      compare("16-bit max", l + 1, 100.0 * max16[l], maxe[l], 1e-6);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
