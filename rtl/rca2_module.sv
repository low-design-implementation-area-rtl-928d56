// rca2_module: two-bit slice of the ripple-carry adder, built from
// three-input majority gates (maj).
//
// Carry logic, as in the slice this design follows:
//   p      = maj(a0, b0, 1)            (a0 | b0)
//   g      = maj(a0, b0, 0)            (a0 & b0)
//   c_mid  = maj(p, g, cin)            carry into bit 1
//   c_out  = maj(maj(a1, b1, p), maj(a1, b1, g), cin)
// c_out is formed from cin through a single majority gate, so the carry
// crosses two bit positions per gate delay along a chain of slices.
//
// Sum logic: sum[i] = a[i] ^ b[i] ^ carry into bit i. The slice this design
// follows gives only the carry network, so the sum bits are this design's
// own, standard choice.
//
// Ports: a, b (2 bits each), cin; sum (2 bits), c_mid (carry out of bit 0),
// c_out (carry out of bit 1). Combinational, no clock.
module rca2_module
  import maj_pkg::maj;
(
  input  logic [1:0] a,
  input  logic [1:0] b,
  input  logic       cin,
  output logic [1:0] sum,
  output logic       c_mid,
  output logic       c_out
);

  logic p, g;

  assign p     = maj(a[0], b[0], 1'b1);
  assign g     = maj(a[0], b[0], 1'b0);
  assign c_mid = maj(p, g, cin);
  assign c_out = maj(maj(a[1], b[1], p), maj(a[1], b[1], g), cin);

  assign sum[0] = a[0] ^ b[0] ^ cin;
  assign sum[1] = a[1] ^ b[1] ^ c_mid;

endmodule
