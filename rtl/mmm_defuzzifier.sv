// mmm_defuzzifier: mean-max membership defuzzifier for two fired rules.
//
// Two Mamdani rules each truncate a trapezoid-shaped consequent at their
// strength F1 or F2. The union of the two truncated consequents has its
// maximum on the plateau of the stronger rule, and the crisp output is the
// middle of that plateau, O = (a + b) / 2, with a and b its first and last
// point. The inputs give each rule's plateau edges: C1X1/C1X2 for rule 1,
// C2X1/C2X2 for rule 2.
//
// Datapath: COMP1 compares F1 with F2 and drives T1 (1 when F2 is higher).
// T1 steers two selectors, one picking the left edge CX1 (C1X1 or C2X1)
// and one the right edge CX2 (C1X2 or C2X2). ADD1 forms R3 = CX1 + CX2 and
// DIV1 divides R3 by the NUM2 input, which is tied to 2 in normal use.
// Equal strengths select rule 1 (this design's choice).
//
// All of it is combinational: O follows the inputs after the propagation
// delay, with no clock, reset or handshake. Widths: 4-bit inputs, 6-bit
// divisor and output.
module mmm_defuzzifier #(
  parameter int unsigned IN_W   = mmm_pkg::IN_W,
  parameter int unsigned DATA_W = mmm_pkg::DATA_W
) (
  input  logic [IN_W-1:0]   F1,    // strength of rule 1
  input  logic [IN_W-1:0]   F2,    // strength of rule 2
  input  logic [IN_W-1:0]   C1X1,  // rule 1 plateau, first point
  input  logic [IN_W-1:0]   C2X1,  // rule 2 plateau, first point
  input  logic [IN_W-1:0]   C1X2,  // rule 1 plateau, last point
  input  logic [IN_W-1:0]   C2X2,  // rule 2 plateau, last point
  input  logic [DATA_W-1:0] NUM2,  // divisor, 2 for the mean
  output logic [DATA_W-1:0] O      // crisp output
);
  logic              t1;
  logic [DATA_W-1:0] cx1, cx2, r3;

  comp1 #(.W(IN_W)) u_comp1 (.f1(F1), .f2(F2), .t1(t1));

  mult1x1 #(.IN_W(IN_W), .OUT_W(DATA_W)) u_mult1c1 (
    .c1x(C1X1), .c2x(C2X1), .sel(t1), .cx(cx1));

  mult1x1 #(.IN_W(IN_W), .OUT_W(DATA_W)) u_mult1c2 (
    .c1x(C1X2), .c2x(C2X2), .sel(t1), .cx(cx2));

  add1 #(.W(DATA_W)) u_add1 (.i1(cx1), .i2(cx2), .o3(r3));

  div1 #(.W(DATA_W)) u_div1 (.q1(r3), .q2(NUM2), .q3(O));
endmodule
