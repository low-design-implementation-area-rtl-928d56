// cmp4: W-bit parallel magnitude comparator (W = 4 in this design).
//
// Works in three steps, all in parallel across the bits:
//   1. Keep the bits where one operand has a 1 and the other a 0:
//      a_only = a & ~b marks where A is larger, b_only = b & ~a where B is.
//   2. Keep only the most significant of those positions: cmp_lookahead
//      raises cmp[i] when all higher bit pairs are equal, and the s/g terms
//      below are a_only and b_only masked with it. At most one of all s and
//      g bits can be set.
//   3. Reduce: gt (A > B) is the OR of the s terms, lt (A < B) the OR of
//      the g terms. Both low means A == B; both high cannot happen.
//
// Ports: a, b (W bits, unsigned), gt, lt. Combinational, no clock.
// The names S0..S3 (feeding A > B), G0..G3 (feeding A < B) and CMP0..CMP3
// follow the comparator structure this design is built from.
module cmp4 #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic         gt,
  output logic         lt
);

  logic [W-1:0] cmp;
  logic [W-1:0] a_only, b_only;
  logic [W-1:0] s, g;

  cmp_lookahead #(.W(W)) u_lookahead (
    .a  (a),
    .b  (b),
    .cmp(cmp)
  );

  assign a_only = a & ~b;
  assign b_only = b & ~a;
  assign s      = a_only & cmp;
  assign g      = b_only & cmp;
  assign gt     = |s;
  assign lt     = |g;

endmodule
