// tb_seerad_index_detector: checks the group index and D of
// seerad_index_detector at accuracy levels 1 to 4 (N = 32) against the
// reference table, for every group pattern at every leading-one position and
// for random divisors. B_f is computed by the testbench.
module tb_seerad_index_detector;
  import seerad_ref_pkg::*;
  localparam int N = 32;
  logic [N-1:0] b, bf;
  logic [0:0]   idx1;
  logic [0:0]   idx2;
  logic [1:0]   idx3;
  logic [2:0]   idx4;
  logic [3:0]   d1;
  logic [4:0]   d2;
  logic [5:0]   d3;
  logic [7:0]   d4;
  logic         clk = 1'b0;
  int checks = 0, failures = 0;

  seerad_index_detector #(.N(N), .ACC_LEVEL(1)) u1 (.b(b), .bf(bf), .index(idx1), .d(d1));
  seerad_index_detector #(.N(N), .ACC_LEVEL(2)) u2 (.b(b), .bf(bf), .index(idx2), .d(d2));
  seerad_index_detector #(.N(N), .ACC_LEVEL(3)) u3 (.b(b), .bf(bf), .index(idx3), .d(d3));
  seerad_index_detector #(.N(N), .ACC_LEVEL(4)) u4 (.b(b), .bf(bf), .index(idx4), .d(d4));

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [N-1:0] tb_);
    int k;
    b  = tb_;
    k  = ref_k(64'(tb_), N);
    bf = (k < 0) ? '0 : N'(1) << k;
    #1;
    if (k < 0) return;
    checks++;
    if (int'(idx1) != 0 || int'(d1) != ref_d(1, 0) ||
        int'(idx2) != ref_index(64'(tb_), N, 2) || int'(d2) != ref_d(2, ref_index(64'(tb_), N, 2)) ||
        int'(idx3) != ref_index(64'(tb_), N, 3) || int'(d3) != ref_d(3, ref_index(64'(tb_), N, 3)) ||
        int'(idx4) != ref_index(64'(tb_), N, 4) || int'(d4) != ref_d(4, ref_index(64'(tb_), N, 4))) begin
      failures++;
      $display("FAIL b=%h: idx %0d %0d %0d d %0d %0d %0d %0d", tb_, idx2, idx3, idx4, d1, d2, d3, d4);
    end
  endtask

  initial begin
    // Every 3-bit pattern below the leading one at every position (missing
    // bits below B[0] included), plus the tail set to ones.
    for (int k = 0; k < N; k++)
      for (int p = 0; p < 8; p++) begin
        check((N'(1) << k) | ((N'(p) << k) >> 3));
        check((N'(1) << k) | ((N'(p) << k) >> 3) | ((N'(1) << (k > 3 ? k - 3 : 0)) - 1));
      end
    repeat (3000) check(N'($urandom) >> ($urandom % N));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
