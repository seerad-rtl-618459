// tb_seerad_rounding: checks that seerad_rounding keeps exactly the leading
// one of B (N = 32), for zero, every single-bit value, all-ones below each
// position and random values with a random leading position.
module tb_seerad_rounding;
  localparam int N = 32;
  logic [N-1:0] b, bf;
  logic         clk = 1'b0;
  int checks = 0, failures = 0;

  seerad_rounding #(.N(N)) dut (.b(b), .bf(bf));

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [N-1:0] tb_);
    logic [N-1:0] exp = '0;
    for (int i = 0; i < N; i++) if (tb_[i]) exp = N'(1) << i;
    b = tb_;
    #1;
    checks++;
    if (bf !== exp) begin
      failures++;
      $display("FAIL b=%h bf=%h exp=%h", tb_, bf, exp);
    end
  endtask

  initial begin
    check('0);
    for (int i = 0; i < N; i++) begin
      check(N'(1) << i);
      check((N'(1) << i) | ((N'(1) << i) - 1));
    end
    repeat (3000) check(N'($urandom) >> ($urandom % N));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
