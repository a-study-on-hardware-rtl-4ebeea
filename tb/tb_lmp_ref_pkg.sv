// tb_lmp_ref_pkg: reference arithmetic for the layer-multiplexed network
// test benches. 16-bit numbers with 12 fraction bits, products and sums
// kept exactly, and the activation table: word k of a 2**aw-word table holds
// the log-sigmoid at the middle of the k-th of 2**aw equal slices of
// [-8, 8), rounded to 12 fraction bits.
package tb_lmp_ref_pkg;

  function automatic int lut_word(int k, int aw);
    real x;
    x = -8.0 + (real'(k) + 0.5) * 16.0 / real'(1 << aw);
    return int'(4096.0 / (1.0 + $exp(-x)));
  endfunction

  // table index of an exact sum (24 fraction bits)
  function automatic int lut_index(longint s, int aw);
    if (s >= (64'sd1 <<< 27)) return (1 << aw) - 1;
    if (s < -(64'sd1 <<< 27)) return 0;
    return int'((s + (64'sd1 <<< 27)) >>> (28 - aw));
  endfunction

  function automatic int to_q12(real v);
    return int'(v * 4096.0);
  endfunction

  function automatic real rand_real(real lo, real hi);
    return lo + (hi - lo) * real'($urandom_range(0, 1000000)) / 1000000.0;
  endfunction

endpackage
