// tb_seerad_adder: checks that seerad_adder (N = 32, three terms) returns
// the sum of its terms modulo 2^64, for random and all-ones operands.
module tb_seerad_adder;
  localparam int N = 32;
  logic [2*N-1:0] terms [3];
  logic [2*N-1:0] sum;
  logic           clk = 1'b0;
  int checks = 0, failures = 0;

  seerad_adder #(.N(N), .NTERMS(3)) dut (.terms(terms), .sum(sum));

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned x, y, z;
    repeat (3000) begin
      x = {$urandom, $urandom};
      y = {$urandom, $urandom};
      z = ($urandom % 3 == 0) ? '1 : {$urandom, $urandom};
      terms[0] = x; terms[1] = y; terms[2] = z;
      #1;
      checks++;
      if (sum !== 64'(x + y + z)) begin
        failures++;
        $display("FAIL %h + %h + %h = %h", x, y, z, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
