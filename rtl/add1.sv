// add1: unsigned adder forming R3 = CX1 + CX2.
//
// Both operands and the sum are W bits (6 by default). With 4-bit edges
// zero-extended to 6 bits the largest sum is 15 + 15 = 30, so no carry
// is lost at the default widths; a carry out of a wider use is dropped.
// Purely combinational.
module add1 #(
  parameter int unsigned W = mmm_pkg::DATA_W
) (
  input  logic [W-1:0] i1,   // left plateau edge CX1
  input  logic [W-1:0] i2,   // right plateau edge CX2
  output logic [W-1:0] o3    // sum R3
);
  always_comb o3 = i1 + i2;
endmodule
