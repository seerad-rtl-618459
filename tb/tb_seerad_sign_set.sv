// tb_seerad_sign_set: checks that seerad_sign_set (71 bits) passes the
// magnitude when sign is 0 and returns its two's complement negative when
// sign is 1, so that magnitude plus result is zero.
module tb_seerad_sign_set;
  localparam int W = 71;
  logic [W-1:0] mag, q;
  logic         sign, clk = 1'b0;
  int checks = 0, failures = 0;

  seerad_sign_set #(.W(W)) dut (.mag(mag), .sign(sign), .q(q));

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) begin
      mag  = W'({$urandom, $urandom, $urandom});
      if ($urandom % 8 == 0) mag = '0;
      sign = 1'($urandom);
      #1;
      checks++;
      if ((sign && W'(q + mag) !== '0) || (!sign && q !== mag)) begin
        failures++;
        $display("FAIL mag=%h sign=%b q=%h", mag, sign, q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
