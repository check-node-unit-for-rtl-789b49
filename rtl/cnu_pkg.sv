// cnu_pkg: constants shared by the one-hot check node unit.
//
// The message format follows the design description: a check node message
// is q+1 bits, one sign bit and a q-bit magnitude, with q = 3 in the
// configuration that is evaluated. The default check node degree of 72 is
// the largest degree that is evaluated; it is this design's choice of one
// configuration out of the degrees 10..72 that are reported.
package cnu_pkg;

  // Magnitude width q (3-bit magnitude, 4-bit message).
  localparam int unsigned CNU_Q  = 3;
  // Default check node degree d_c (number of CNU inputs).
  localparam int unsigned CNU_DC = 72;

  // Width of an index into n items; at least one bit.
  function automatic int unsigned idx_w(input int unsigned n);
    return (n > 1) ? $clog2(n) : 1;
  endfunction

endpackage
