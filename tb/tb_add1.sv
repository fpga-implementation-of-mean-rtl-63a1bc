// tb_add1: exhaustive self-checking test of the 6-bit adder.
// Every operand pair is applied; the sum must equal the integer sum
// taken modulo 64.
module tb_add1;
  logic [5:0] i1, i2, o3;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  add1 dut (.i1(i1), .i2(i2), .o3(o3));

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
        int exp_sum;
        i1 = 6'(a);
        i2 = 6'(b);
        #1;
        exp_sum = (a + b) % 64;
        checks++;
        if (int'(o3) != exp_sum) begin
          failures++;
          $display("FAIL %0d + %0d = %0d expected %0d", a, b, o3, exp_sum);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
