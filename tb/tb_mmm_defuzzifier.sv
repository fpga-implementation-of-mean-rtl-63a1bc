// tb_mmm_defuzzifier: end-to-end self-checking test of the MMM defuzzifier
// at its default widths (no parameter overrides).
//
// Part 1 applies the three worked examples: rule 1 stronger (output 4),
// rule 2 stronger (output 0x0A) and rule 1 stronger again (output 5). For
// each it checks the comparator result, both selected edges, the sum and
// the output.
//
// Part 2 applies random rule pairs with the divisor at 2. The expected
// value comes from a geometric model: the aggregated output membership is
// sampled at every point z of the 4-bit axis (the level of each rule's
// plateau where z lies on it), the highest level is found, and the output
// is the truncated mean of the first and last z that reach it. Ties in
// strength follow this design's rule (rule 1 is used) and are checked
// against rule 1's plateau midpoint. Part 3 varies the divisor.
//
// The test counts how often rule 1 wins, rule 2 wins and the strengths tie,
// and fails if any of those never happened.
module tb_mmm_defuzzifier;
  import mmm_pkg::*;

  logic [IN_W-1:0]   F1, F2, C1X1, C2X1, C1X2, C2X2;
  logic [DATA_W-1:0] NUM2, O;
  int checks = 0, failures = 0;
  int n_rule1 = 0, n_rule2 = 0, n_tie = 0;
  logic clk = 1'b0;

  mmm_defuzzifier dut (
    .F1(F1), .F2(F2), .C1X1(C1X1), .C2X1(C2X1), .C1X2(C1X2), .C2X2(C2X2),
    .NUM2(NUM2), .O(O));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got 0x%0h expected 0x%0h (F1=%0h F2=%0h C1X1=%0h C1X2=%0h C2X1=%0h C2X2=%0h NUM2=%0h)",
               what, got, exp, F1, F2, C1X1, C1X2, C2X1, C2X2, NUM2);
    end
  endtask

  task automatic apply(int f1, int f2, int c1x1, int c1x2, int c2x1, int c2x2, int num2);
    F1 = IN_W'(f1);  F2 = IN_W'(f2);
    C1X1 = IN_W'(c1x1); C1X2 = IN_W'(c1x2);
    C2X1 = IN_W'(c2x1); C2X2 = IN_W'(c2x2);
    NUM2 = DATA_W'(num2);
    @(posedge clk);
    #1;
    if (f1 > f2)      n_rule1++;
    else if (f1 < f2) n_rule2++;
    else              n_tie++;
  endtask

  // Mean of the first and last maximum point of the aggregated membership.
  function automatic int mmm_model(int f1, int f2, int c1x1, int c1x2, int c2x1, int c2x2);
    int lvl [16];
    int top_lvl, first_z, last_z;
    top_lvl = -1; first_z = -1; last_z = -1;
    for (int z = 0; z < 16; z++) begin
      lvl[z] = 0;
      if (z >= c1x1 && z <= c1x2 && f1 > lvl[z]) lvl[z] = f1;
      if (z >= c2x1 && z <= c2x2 && f2 > lvl[z]) lvl[z] = f2;
      if (lvl[z] > top_lvl) top_lvl = lvl[z];
    end
    for (int z = 0; z < 16; z++) begin
      if (lvl[z] == top_lvl) begin
        if (first_z < 0) first_z = z;
        last_z = z;
      end
    end
    return (first_z + last_z) / 2;
  endfunction

  initial begin
    // Part 1: the worked examples, divisor 2.
    apply('hA, 'h5, 2, 6, 7, 'hD, DIVISOR_DEFAULT);
    check("ex1 T1",  int'(dut.t1),  0);
    check("ex1 CX1", int'(dut.cx1), 'h02);
    check("ex1 CX2", int'(dut.cx2), 'h06);
    check("ex1 R3",  int'(dut.r3),  'h08);
    check("ex1 O",   int'(O),       'h04);

    apply('h5, 'hA, 1, 7, 8, 'hC, DIVISOR_DEFAULT);
    check("ex2 T1",  int'(dut.t1),  1);
    check("ex2 CX1", int'(dut.cx1), 'h08);
    check("ex2 CX2", int'(dut.cx2), 'h0C);
    check("ex2 R3",  int'(dut.r3),  'h14);
    check("ex2 O",   int'(O),       'h0A);

    apply('hF, 'hA, 3, 7, 8, 'hC, DIVISOR_DEFAULT);
    check("ex3 T1",  int'(dut.t1),  0);
    check("ex3 CX1", int'(dut.cx1), 'h03);
    check("ex3 CX2", int'(dut.cx2), 'h07);
    check("ex3 R3",  int'(dut.r3),  'h0A);
    check("ex3 O",   int'(O),       'h05);

    // Part 2: random rule pairs, divisor 2.
    for (int n = 0; n < 3000; n++) begin
      int f1, f2, a1, b1, a2, b2, t, exp_o;
      f1 = 1 + int'($urandom_range(14));
      f2 = (n % 8 == 0) ? f1 : 1 + int'($urandom_range(14));
      a1 = int'($urandom_range(15)); b1 = int'($urandom_range(15));
      a2 = int'($urandom_range(15)); b2 = int'($urandom_range(15));
      if (a1 > b1) begin t = a1; a1 = b1; b1 = t; end
      if (a2 > b2) begin t = a2; a2 = b2; b2 = t; end
      apply(f1, f2, a1, b1, a2, b2, DIVISOR_DEFAULT);
      if (f1 == f2) exp_o = (a1 + b1) / 2;
      else          exp_o = mmm_model(f1, f2, a1, b1, a2, b2);
      check("random O", int'(O), exp_o);
    end

    // Part 3: other divisors on the selected sum.
    for (int n = 0; n < 500; n++) begin
      int f1, f2, e [4], d, s, exp_o;
      f1 = int'($urandom_range(15)); f2 = int'($urandom_range(15));
      for (int k = 0; k < 4; k++) e[k] = int'($urandom_range(15));
      d = 1 + int'($urandom_range(62));
      apply(f1, f2, e[0], e[1], e[2], e[3], d);
      s = (f1 < f2) ? e[2] + e[3] : e[0] + e[1];
      exp_o = s / d;
      check("divisor O", int'(O), exp_o);
    end

    $display("rule 1 selected %0d times, rule 2 selected %0d times, ties %0d times",
             n_rule1, n_rule2, n_tie);
    if (n_rule1 == 0) begin failures++; $display("FAIL rule 1 never selected"); end
    if (n_rule2 == 0) begin failures++; $display("FAIL rule 2 never selected"); end
    if (n_tie == 0)   begin failures++; $display("FAIL equal strengths never applied"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
