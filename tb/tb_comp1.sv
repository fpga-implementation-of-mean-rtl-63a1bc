// tb_comp1: exhaustive self-checking test of the rule-strength comparator.
// Every pair (f1, f2) of 4-bit values is applied; T1 must be 1 exactly when
// f2 is strictly larger, and 0 for f1 > f2 and for a tie.
module tb_comp1;
  logic [3:0] f1, f2;
  logic       t1;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  comp1 dut (.f1(f1), .f2(f2), .t1(t1));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 16; a++) begin
      for (int b = 0; b < 16; b++) begin
        logic exp_t1;
        f1 = 4'(a);
        f2 = 4'(b);
        #1;
        if (a > b)      exp_t1 = 1'b0;
        else if (a < b) exp_t1 = 1'b1;
        else            exp_t1 = 1'b0;
        checks++;
        if (t1 !== exp_t1) begin
          failures++;
          $display("FAIL f1=%0d f2=%0d t1=%0b expected %0b", a, b, t1, exp_t1);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
