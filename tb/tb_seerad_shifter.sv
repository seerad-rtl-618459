// tb_seerad_shifter: checks seerad_shifter (N = 32, level 4, so 71 output
// bits with 39 fraction bits) for every shift K and random products: the
// output must equal p * 2^N / 2^K exactly, and zero when B_f is zero.
module tb_seerad_shifter;
  localparam int N  = 32;
  localparam int L  = 7;
  localparam int QW = 2 * N + L;
  logic [2*N-1:0] p;
  logic [N-1:0]   bf;
  logic [QW-1:0]  q;
  logic           clk = 1'b0;
  int checks = 0, failures = 0;

  seerad_shifter #(.N(N), .ACC_LEVEL(4)) dut (.p(p), .bf(bf), .q(q));

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [2*N-1:0] tp, input int k);
    logic [127:0] exp;
    p  = tp;
    bf = (k < 0) ? '0 : N'(1) << k;
    exp = (k < 0) ? '0 : (128'(tp) << N) >> k;
    #1;
    checks++;
    if (128'(q) !== exp) begin
      failures++;
      $display("FAIL p=%h k=%0d q=%h exp=%h", tp, k, q, exp);
    end
  endtask

  initial begin
    check(64'h12345, -1);
    for (int k = 0; k < N; k++) begin
      check((64'd1 << (N + L)) - 1, k);
      repeat (100) check({$urandom, $urandom} & ((64'd1 << (N + L)) - 1), k);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
