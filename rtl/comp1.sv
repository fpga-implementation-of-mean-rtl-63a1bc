// comp1: two-input magnitude comparator of rule strengths.
//
// F1 and F2 are the truncation levels (the min of the two antecedent
// memberships) of rule 1 and rule 2. T1 tells which rule reaches higher:
// T1 = 0 when F1 > F2 (rule 1 wins), T1 = 1 when F1 < F2 (rule 2 wins).
// For F1 == F2 neither rule is higher; this design then keeps T1 = 0 so
// rule 1's plateau is used. Purely combinational, no clock or latency.
module comp1 #(
  parameter int unsigned W = mmm_pkg::IN_W
) (
  input  logic [W-1:0] f1,   // strength of rule 1
  input  logic [W-1:0] f2,   // strength of rule 2
  output logic         t1    // 1: rule 2 is higher, 0: rule 1 is higher or equal
);
  always_comb t1 = (f1 < f2);
endmodule
