// neuro_pkg: types and constants shared by the neuroprocessor modules.
//
// A neuron input is a ternary value in sign-magnitude form: a one-bit
// magnitude (0 or 1) and a sign bit, so it stands for -1, 0 or +1. The
// outputs of the hard limiters feed the next layer in this form (always
// magnitude 1). Weights are sign-magnitude words: bit WEIGHT_MAG_W is the
// sign (1 = negative), the bits below it the magnitude. The sign-magnitude
// encoding follows the signed multiplication cell, which works on a
// magnitude and a separate sign; the widths are this design's own choice.
package neuro_pkg;

  // Magnitude bits of a weight (the sign bit comes on top).
  parameter int unsigned WEIGHT_MAG_W = 8;

  // Ternary neuron input: neg = sign (1 = negative), nz = magnitude bit.
  typedef struct packed {
    logic neg;
    logic nz;
  } bip_t;

  // Two's complement width that holds the sum of n_terms products of a
  // ternary input and a weight of w magnitude bits without overflow:
  // |sum| <= n_terms * (2**w - 1) < 2**(w + clog2(n_terms)).
  function automatic int unsigned sum_width(int unsigned w, int unsigned n_terms);
    return w + $clog2(n_terms) + 1;
  endfunction

  // Hard limiter output (1 = +1, 0 = -1) as an input of the next layer.
  function automatic bip_t from_limiter(logic y);
    return '{neg: ~y, nz: 1'b1};
  endfunction

endpackage
