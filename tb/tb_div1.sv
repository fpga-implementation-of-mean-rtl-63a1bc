// tb_div1: exhaustive self-checking test of the 6-bit divider.
// Every dividend/divisor pair is applied. The expected quotient is found
// by counting how many times the divisor fits into the dividend (repeated
// subtraction), independent of the long-division hardware; a zero divisor
// must give all ones.
module tb_div1;
  logic [5:0] q1, q2, q3;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  div1 dut (.q1(q1), .q2(q2), .q3(q3));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 64; a++) begin
      for (int b = 0; b < 64; b++) begin
        int exp_q, left;
        q1 = 6'(a);
        q2 = 6'(b);
        #1;
        if (b == 0) begin
          exp_q = 63;
        end else begin
          exp_q = 0;
          left  = a;
          while (left >= b) begin
            left -= b;
            exp_q++;
          end
        end
        checks++;
        if (int'(q3) != exp_q) begin
          failures++;
          $display("FAIL %0d / %0d = %0d expected %0d", a, b, q3, exp_q);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
