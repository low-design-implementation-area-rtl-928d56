// rca: N-bit ripple-carry adder made of N/2 two-bit slices (rca2_module).
//
// Slice k adds bits 2k+1..2k and passes its c_out straight to the cin of
// slice k+1, so the carry ripples two bit positions per slice. N must be
// even. The default width of 32 bits is the one the design targets.
//
// Ports: a, b (N-bit unsigned operands), cin; sum (N bits) and cout, with
// {cout, sum} = a + b + cin. Combinational, no clock; the worst-case path
// runs through all N/2 slices.
module rca #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);

  if (N % 2 != 0 || N == 0) begin : g_bad_width
    $error("rca: N must be a positive even number");
  end

  localparam int unsigned SLICES = N / 2;

  logic [SLICES:0] carry;  // carry[k]: carry into slice k

  assign carry[0] = cin;

  for (genvar k = 0; k < SLICES; k++) begin : g_slice
    logic c_mid_unused;
    rca2_module u_slice (
      .a    (a[2*k +: 2]),
      .b    (b[2*k +: 2]),
      .cin  (carry[k]),
      .sum  (sum[2*k +: 2]),
      .c_mid(c_mid_unused),
      .c_out(carry[k+1])
    );
  end

  assign cout = carry[SLICES];

endmodule
