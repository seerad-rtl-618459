// tb_seerad_sign_detector: checks |A|, |B| and the quotient sign of
// seerad_sign_detector at N = 32 on corner values and random inputs, against
// magnitudes worked out with 64-bit signed arithmetic.
module tb_seerad_sign_detector;
  localparam int N = 32;
  logic [N-1:0] a, b, a_abs, b_abs;
  logic         sign, clk = 1'b0;
  int checks = 0, failures = 0;

  seerad_sign_detector #(.N(N)) dut (.a(a), .b(b), .a_abs(a_abs), .b_abs(b_abs), .sign(sign));

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N-1:0] mag(input logic [N-1:0] x);
    longint v = longint'($signed(x));
    return N'(v < 0 ? -v : v);
  endfunction

  task automatic check(input logic [N-1:0] ta, input logic [N-1:0] tb_);
    a = ta; b = tb_;
    #1;
    checks++;
    if (a_abs !== mag(ta) || b_abs !== mag(tb_) || sign !== (ta[N-1] != tb_[N-1])) begin
      failures++;
      $display("FAIL a=%h b=%h -> %h %h %b", ta, tb_, a_abs, b_abs, sign);
    end
  endtask

  initial begin
    logic [N-1:0] corners [6] = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h8000_0000, 32'h7FFF_FFFF, 32'h8000_0001};
    foreach (corners[i]) foreach (corners[j]) check(corners[i], corners[j]);
    repeat (2000) check($urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
