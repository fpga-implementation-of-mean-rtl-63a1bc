// mult1x1: 2:1 selector for a plateau-edge position.
//
// The defuzzifier uses two of these. One chooses the left plateau edge
// (CX1) between rule 1 and rule 2, the other the right edge (CX2). The
// select is the comparator output T1: 0 passes the rule-1 edge, 1 the
// rule-2 edge. The selected 4-bit edge is zero-extended to the 6-bit
// internal bus that feeds the adder. Purely combinational.
module mult1x1 #(
  parameter int unsigned IN_W  = mmm_pkg::IN_W,
  parameter int unsigned OUT_W = mmm_pkg::DATA_W
) (
  input  logic [IN_W-1:0]  c1x,  // edge position from rule 1
  input  logic [IN_W-1:0]  c2x,  // edge position from rule 2
  input  logic             sel,  // T1 from the comparator
  output logic [OUT_W-1:0] cx    // selected edge, zero-extended
);
  always_comb cx = OUT_W'(sel ? c2x : c1x);
endmodule
