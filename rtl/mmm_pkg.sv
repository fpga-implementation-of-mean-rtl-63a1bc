// mmm_pkg: widths shared by the mean-max membership (MMM) defuzzifier.
//
// Rule strengths (F1, F2) and plateau-edge positions on the output axis
// (C1X1, C2X1, C1X2, C2X2) are 4-bit unsigned values. The internal edge
// bus, the sum and the quotient are 6 bits wide, as is the divisor input.
// These widths follow the defuzzifier schematic; the divisor default of 2
// is the "/2" of the mean-max formula Y = (a + b) / 2.
package mmm_pkg;
  localparam int unsigned IN_W   = 4;  // membership grade and edge width
  localparam int unsigned DATA_W = 6;  // widened edge, sum, divisor, output
  localparam int unsigned DIVISOR_DEFAULT = 2;
endpackage
