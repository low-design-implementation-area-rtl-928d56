// maj_pkg: the three-input majority function, the basic gate of the
// ripple-carry slice. maj(x, y, z) is 1 when at least two inputs are 1. With
// one input tied to 0 it acts as a two-input AND, tied to 1 as a two-input OR,
// which is how the slice derives its generate and propagate terms.
package maj_pkg;

  function automatic logic maj(input logic x, input logic y, input logic z);
    return (x & y) | (x & z) | (y & z);
  endfunction

endpackage
