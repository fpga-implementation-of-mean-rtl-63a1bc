// div1: unsigned integer divider forming O = R3 / NUM2.
//
// The mean-max formula halves the sum of the two plateau edges, so the
// divisor input is normally tied to 2; the block nevertheless divides by
// any W-bit value. The quotient is truncated toward zero. A zero divisor
// has no defined quotient; this design then returns all ones. Built as a
// combinational restoring long division, one W-bit trial subtraction per
// quotient bit, most significant bit first. No clock or latency.
module div1 #(
  parameter int unsigned W = mmm_pkg::DATA_W
) (
  input  logic [W-1:0] q1,   // dividend R3
  input  logic [W-1:0] q2,   // divisor NUM2
  output logic [W-1:0] q3    // quotient O
);
  logic [W:0]   rem;
  logic [W-1:0] quo;

  always_comb begin
    rem = '0;
    quo = '0;
    for (int i = int'(W) - 1; i >= 0; i--) begin
      rem = {rem[W-1:0], q1[i]};
      if (rem >= {1'b0, q2}) begin
        rem    = rem - {1'b0, q2};
        quo[i] = 1'b1;
      end
    end
    q3 = (q2 == '0) ? '1 : quo;
  end
endmodule
