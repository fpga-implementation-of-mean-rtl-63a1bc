// tb_mult1x1: exhaustive self-checking test of the edge selector.
// All 4-bit rule-1/rule-2 edge pairs are applied with both select values;
// the 6-bit output must equal the chosen edge with two zero upper bits.
module tb_mult1x1;
  logic [3:0] c1x, c2x;
  logic       sel;
  logic [5:0] cx;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  mult1x1 dut (.c1x(c1x), .c2x(c2x), .sel(sel), .cx(cx));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 2; s++) begin
      for (int a = 0; a < 16; a++) begin
        for (int b = 0; b < 16; b++) begin
          int exp_cx;
          c1x = 4'(a);
          c2x = 4'(b);
          sel = 1'(s);
          #1;
          exp_cx = (s == 1) ? b : a;
          checks++;
          if (int'(cx) != exp_cx) begin
            failures++;
            $display("FAIL sel=%0d c1x=%0d c2x=%0d cx=%0d expected %0d", s, a, b, cx, exp_cx);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
