// tb_seerad_image: image division, pixel by pixel, with the SEERAD divider
// at N = 32 (signed, the default width) at accuracy levels 1 to 4.
// Each output pixel is the quotient of the two corresponding pixels of
// consecutive 8-bit frames, as used to detect change in a frame sequence.
// The frames are generated here (352x288, a moving bright square on a
// gradient, plus noise). For every frame pair the testbench computes the PSNR
// of the approximate quotient image against the exact one,
//     PSNR = 10 log10(255^2 / MSE),
// and checks that every quotient pixel is bit-exact against the reference
// model, that PSNR rises with the accuracy level, and that it lies in the
// 50..100 dB band of the published results for natural video. Pixels with a
// zero divisor are left out of the PSNR.
module tb_seerad_image;
  import seerad_ref_pkg::*;
  localparam int N = 32;
  localparam int W = 352;
  localparam int H = 288;
  localparam int FRAMES = 5;

  logic [N-1:0]  a, b;
  logic [127:0]  q [4];
  logic          unused_dz [4];
  logic          clk = 1'b0;
  int checks = 0, failures = 0;

  for (genvar l = 1; l <= 4; l++) begin : g_lvl
    localparam int LL = (l == 1) ? 3 : (l == 2) ? 4 : (l == 3) ? 5 : 7;
    logic [2*N+LL-1:0] o;
    seerad #(.N(N), .ACC_LEVEL(l)) u (.a(a), .b(b), .q(o), .div_by_zero(unused_dz[l-1]));
    assign q[l-1] = 128'(o);
  end

  always #5 clk = ~clk;
  initial begin
    repeat (10000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Pixel (x, y) of frame f: gradient background, a bright 64x64 square that
  // moves 6 pixels per frame, and +-8 of noise.
  function automatic int pixel(input int f, input int x, input int y);
    int v = (x + y) * 200 / (W + H) + 20;
    if (x >= 40 + 6 * f && x < 104 + 6 * f && y >= 100 && y < 164) v = 220;
    v = v + int'($urandom % 17) - 8;
    return v < 0 ? 0 : (v > 255 ? 255 : v);
  endfunction

  initial begin
    int   prev [H][W];
    int   cur  [H][W];
    real  se [4];
    real  psnr [4];
    real  exact, e;
    int   count, bit_errs;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) prev[y][x] = pixel(0, x, y);
    for (int f = 1; f <= FRAMES; f++) begin
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) cur[y][x] = pixel(f, x, y);
      foreach (se[l]) se[l] = 0.0;
      count = 0;
      bit_errs = 0;
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          a = N'(cur[y][x]);
          b = N'(prev[y][x]);
          #1;
          if (prev[y][x] == 0) continue;
          exact = real'(cur[y][x]) / real'(prev[y][x]);
          for (int l = 0; l < 4; l++) begin
            if (q[l] !== ref_q(l + 1, N, 1'b1, 64'(cur[y][x]), 64'(prev[y][x]))) bit_errs++;
            e = ref_real(q[l], N, l + 1, 1'b1) - exact;
            se[l] += e * e;
          end
          count++;
        end
      checks++;
      if (bit_errs != 0) begin
        failures++;
        $display("FAIL frame %0d: %0d quotient pixels differ from the reference", f, bit_errs);
      end
      for (int l = 0; l < 4; l++) begin
        psnr[l] = 10.0 * $log10(255.0 * 255.0 / (se[l] / count));
        checks++;
        if (psnr[l] < 50.0 || psnr[l] > 100.0 || (l > 0 && psnr[l] <= psnr[l-1])) begin
          failures++;
          $display("FAIL frame %0d level %0d: PSNR %.1f dB", f, l + 1, psnr[l]);
        end
      end
      $display("  frames %0d/%0d: PSNR %.1f %.1f %.1f %.1f dB (levels 1-4)", f - 1, f, psnr[0], psnr[1], psnr[2], psnr[3]);
      prev = cur;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
