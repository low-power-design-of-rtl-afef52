// tb_util_pkg: reference arithmetic for the neuroprocessor testbenches.
// Weights are sign-magnitude words of W magnitude bits; inputs are ternary
// values in the neuro_pkg::bip_t form. The functions here compute the
// weighted sum with plain integer arithmetic, independently of the RTL.
package tb_util_pkg;
  import neuro_pkg::*;

  // Integer value of a sign-magnitude weight word of w magnitude bits.
  function automatic int weight_value(logic [31:0] word, int unsigned w);
    int mag;
    mag = int'(word & ((32'd1 << w) - 1));
    return word[w] ? -mag : mag;
  endfunction

  // Integer value of a ternary input.
  function automatic int input_value(bip_t x);
    if (!x.nz) return 0;
    return x.neg ? -1 : 1;
  endfunction

  // Random ternary input; zero with probability about 1/4.
  function automatic bip_t random_input();
    bip_t x;
    x.nz  = ($urandom_range(3) != 0);
    x.neg = 1'($urandom);
    return x;
  endfunction

  // Random sign-magnitude weight with magnitude at most max_mag.
  function automatic logic [31:0] random_weight(int unsigned w, int unsigned max_mag);
    logic [31:0] word;
    word = 32'($urandom_range(max_mag));
    word[w] = 1'($urandom);
    return word;
  endfunction
endpackage
