// cmp_lookahead: compare look-ahead logic of the parallel magnitude comparator.
//
// For every bit position i of two W-bit operands it raises cmp[i] when all
// bit pairs above i are equal (a[j] == b[j] for every j > i). The most
// significant position is therefore always enabled, and at most one
// position that holds a differing bit pair sees its cmp bit set: the most
// significant one. The comparator uses cmp[i] to keep only that position,
// which is the "priority" step of the comparison.
//
// cmp[W-1] is constant 1 by definition (nothing lies above the MSB); it is
// kept as a port bit so that every position has its enable.
//
// Purely combinational, no clock. The block and its CMP outputs come from the
// comparator structure this design follows; its internal realisation (a
// chain of equality terms from the top bit down) is this design's choice.
module cmp_lookahead #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] cmp
);

  logic [W-1:0] bit_eq;
  logic [W:0]   eq_above;  // eq_above[i]: all pairs at positions >= i are equal

  assign bit_eq = ~(a ^ b);

  always_comb begin
    eq_above[W] = 1'b1;
    for (int i = W - 1; i >= 0; i--) begin
      eq_above[i] = eq_above[i+1] & bit_eq[i];
    end
  end

  assign cmp = eq_above[W:1];

endmodule
