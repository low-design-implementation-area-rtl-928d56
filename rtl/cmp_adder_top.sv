// cmp_adder_top: the two arithmetic units of this design side by side.
//
//   - cmp32_tree: 32-bit tree magnitude comparator. cmp_gt is 1 when
//     cmp_a > cmp_b; cmp_gt_w / cmp_lt_w show the nibble (bits 7..0) and
//     16-bit-half (bits 9..8) partial results.
//   - rca: 32-bit ripple-carry adder of two-bit majority-gate slices,
//     {add_cout, add_sum} = add_a + add_b + add_cin.
//
// The two units share no signals; each has its own ports. Everything is
// combinational, with no clock or reset.
module cmp_adder_top (
  input  logic [31:0] cmp_a,
  input  logic [31:0] cmp_b,
  output logic        cmp_gt,
  output logic [9:0]  cmp_gt_w,
  output logic [9:0]  cmp_lt_w,
  input  logic [31:0] add_a,
  input  logic [31:0] add_b,
  input  logic        add_cin,
  output logic [31:0] add_sum,
  output logic        add_cout
);

  cmp32_tree u_cmp (
    .a   (cmp_a),
    .b   (cmp_b),
    .gt  (cmp_gt),
    .gt_w(cmp_gt_w),
    .lt_w(cmp_lt_w)
  );

  rca #(.N(32)) u_add (
    .a   (add_a),
    .b   (add_b),
    .cin (add_cin),
    .sum (add_sum),
    .cout(add_cout)
  );

endmodule
