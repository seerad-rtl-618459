// tb_seerad_full: runs the SEERAD divider with every parameter at its
// default (32-bit signed, accuracy level 4). It checks a worked example by
// value (1000 / 10: the divisor's leading one is at K = 3, the next bits 010
// select D = 97, so q = 1000 * 97 / 2^(3+7) = 94.7265625), the sign handling
// and the zero divisor, then compares random divisions bit for bit with the
// reference model. The divider is combinational: results are read 1 ns after
// the inputs change.
module tb_seerad_full;
  import seerad_ref_pkg::*;
  localparam int N = 32;
  localparam int QW = 2 * N + 7;

  logic [N-1:0]  a, b;
  logic [QW-1:0] q;
  logic          dz;
  logic          clk = 1'b0;
  int checks = 0, failures = 0;

  seerad dut (.a(a), .b(b), .q(q), .div_by_zero(dz));

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_real(input logic [N-1:0] ta, input logic [N-1:0] tb_, input real exp);
    real v;
    a = ta; b = tb_;
    #1;
    v = ref_real(128'(q), N, 4, 1'b1);
    checks++;
    if (v != exp) begin
      failures++;
      $display("FAIL %0d / %0d = %f, expected %f", $signed(ta), $signed(tb_), v, exp);
    end
  endtask

  task automatic check_ref(input logic [N-1:0] ta, input logic [N-1:0] tb_);
    a = ta; b = tb_;
    #1;
    checks++;
    if (128'(q) !== ref_q(4, N, 1'b1, 64'(ta), 64'(tb_)) || dz !== (tb_ == '0)) begin
      failures++;
      $display("FAIL a=%h b=%h q=%h", ta, tb_, q);
    end
  endtask

  initial begin
    check_real(32'd1000, 32'd10, 94.7265625);
    check_real(-32'sd1000, 32'd10, -94.7265625);
    check_real(32'd1000, -32'sd10, -94.7265625);
    check_real(-32'sd1000, -32'sd10, 94.7265625);
    check_real(32'd128, 32'd1, 120.0);          // B = 1: group 0, D = 120
    check_real(32'd1000, 32'd0, 0.0);
    checks++;
    if (!dz) failures++;
    repeat (5000) check_ref($urandom, N'($urandom) >> ($urandom % N));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
