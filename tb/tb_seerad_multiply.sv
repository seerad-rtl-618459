// tb_seerad_multiply: checks seerad_multiply at levels 1 to 4 (N = 32): the
// number of shift terms (2, 2, 2, 3), that each term is |A| times a signed
// power of two, and that the terms add up to |A| * D for every D of the level.
module tb_seerad_multiply;
  import seerad_ref_pkg::*;
  localparam int N = 32;
  logic [N-1:0]   a;
  logic [3:0]     d1;
  logic [4:0]     d2;
  logic [5:0]     d3;
  logic [7:0]     d4;
  logic [2*N-1:0] t1 [2];
  logic [2*N-1:0] t2 [2];
  logic [2*N-1:0] t3 [2];
  logic [2*N-1:0] t4 [3];
  logic           clk = 1'b0;
  int checks = 0, failures = 0;

  seerad_multiply #(.N(N), .ACC_LEVEL(1)) u1 (.a(a), .d(d1), .terms(t1));
  seerad_multiply #(.N(N), .ACC_LEVEL(2)) u2 (.a(a), .d(d2), .terms(t2));
  seerad_multiply #(.N(N), .ACC_LEVEL(3)) u3 (.a(a), .d(d3), .terms(t3));
  seerad_multiply #(.N(N), .ACC_LEVEL(4)) u4 (.a(a), .d(d4), .terms(t4));

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // A term is 0 or +-(a << s) for some s.
  function automatic bit is_shift_term(input logic [2*N-1:0] t, input logic [N-1:0] av);
    logic [2*N-1:0] ae = {{N{1'b0}}, av};
    if (t == '0) return 1'b1;
    for (int s = 0; s <= 8; s++)
      if (t == (ae << s) || t == -(ae << s)) return 1'b1;
    return 1'b0;
  endfunction

  task automatic check_sum(input int level, input int g, input logic [2*N-1:0] t [], input logic [N-1:0] av);
    logic [2*N-1:0] s = '0;
    bit ok = 1'b1;
    foreach (t[i]) begin
      s += t[i];
      ok &= is_shift_term(t[i], av);
    end
    checks++;
    if (!ok || s !== (2*N)'(av) * (2*N)'(ref_d(level, g))) begin
      failures++;
      $display("FAIL level %0d group %0d a=%h sum=%h", level, g, av, s);
    end
  endtask

  initial begin
    checks++;
    if ($size(t1) != 2 || $size(t2) != 2 || $size(t3) != 2 || $size(t4) != 3) failures++;
    repeat (300) begin
      a = $urandom;
      if ($urandom % 4 == 0) a = '1;
      for (int g = 0; g < 8; g++) begin
        d1 = 4'(ref_d(1, 0));
        d2 = 5'(ref_d(2, g % 2));
        d3 = 6'(ref_d(3, g % 4));
        d4 = 8'(ref_d(4, g));
        #1;
        check_sum(1, 0, t1, a);
        check_sum(2, g % 2, t2, a);
        check_sum(3, g % 4, t3, a);
        check_sum(4, g, t4, a);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
