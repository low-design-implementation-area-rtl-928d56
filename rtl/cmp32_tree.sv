// cmp32_tree: 32-bit magnitude comparator built as a three-level tree.
//
// Level 1: eight 4-bit comparators (cmp4), one per nibble; nibble k covers
//          bits 4k+3..4k and yields (gt_w[k], lt_w[k]).
// Level 2: two more cmp4 instances. Each takes the four nibble results of
//          one 16-bit half and treats them as two 4-bit numbers: the gt bits
//          as operand A and the lt bits as operand B. A nibble that reports
//          gt then acts as a 1 in A over a 0 in B, a nibble that reports lt
//          as the reverse, and an equal nibble as a 0/0 pair, so the cmp4
//          result is exactly the comparison of the 16-bit halves. The lower
//          half (bits 15..0) gives (gt_w[8], lt_w[8]), the upper half
//          (bits 31..16) gives (gt_w[9], lt_w[9]).
// Level 3: the reduced 2-bit comparator (cmp2_mod) combines the two halves
//          the same way and raises gt when A > B.
//
// Ports: a, b (32-bit unsigned operands); gt (1 if A > B, 0 if A <= B);
// gt_w, lt_w (10 bits each) expose the partial results of levels 1 and 2 for
// observation. Combinational, no clock; the path crosses three comparator
// levels.
//
// The tree shape, the reuse of the 4-bit comparator at level 2 and the
// reduced 2-bit comparator follow the structure this design is built on.
// The numbering of the partial results (nibbles 0..7, then the lower and the
// upper half) is this design's choice; the meaning of each bit follows its
// name.
module cmp32_tree (
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic        gt,
  output logic [9:0]  gt_w,
  output logic [9:0]  lt_w
);

  // Level 1: one comparator per nibble.
  for (genvar k = 0; k < 8; k++) begin : g_nibble
    cmp4 #(.W(4)) u_cmp (
      .a (a[4*k +: 4]),
      .b (b[4*k +: 4]),
      .gt(gt_w[k]),
      .lt(lt_w[k])
    );
  end

  // Level 2: one comparator per 16-bit half, fed with the nibble results.
  for (genvar h = 0; h < 2; h++) begin : g_half
    cmp4 #(.W(4)) u_cmp (
      .a (gt_w[4*h +: 4]),
      .b (lt_w[4*h +: 4]),
      .gt(gt_w[8+h]),
      .lt(lt_w[8+h])
    );
  end

  // Level 3: reduced 2-bit comparator over the two halves.
  cmp2_mod u_final (
    .a (gt_w[9:8]),
    .b (lt_w[9:8]),
    .gt(gt)
  );

endmodule
