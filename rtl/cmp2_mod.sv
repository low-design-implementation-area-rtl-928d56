// cmp2_mod: reduced 2-bit comparator that forms the final A > B result of the
// 32-bit comparator tree.
//
// Its inputs are the results of two 16-bit halves. Each half delivers a
// (gt, lt) pair, and the pairs are compared as 2-bit numbers: the gt bits
// form operand A = {gt_hi, gt_lo} and the lt bits form operand B =
// {lt_hi, lt_lo}. Because a comparator never raises gt and lt together,
// six of the sixteen input combinations cannot occur, and the A > B
// function shrinks to
//     gt = A1 | (~A1 & A0 & ~B1 & ~B0).
// Only A > B is produced: the output is 1 when A > B and 0 when A <= B.
//
// Combinational, no clock. The reduced equation and the single output are
// the ones this design follows; the assertion of the input premise is this
// design's own addition.
module cmp2_mod (
  input  logic [1:0] a,   // {gt of upper half, gt of lower half}
  input  logic [1:0] b,   // {lt of upper half, lt of lower half}
  output logic       gt
);

  assign gt = a[1] | (~a[1] & a[0] & ~b[1] & ~b[0]);

  // The reduced equation is only valid when no half reports gt and lt at once.
  always_comb begin
    assert ((a & b) == 2'b00)
      else $error("cmp2_mod: a half reports both A>B and A<B");
  end

endmodule
