// tb_nocnn_ref_pkg: reference arithmetic for the NoC neural processor
// testbenches, written independently of the RTL.
//
// Fixed point: 32-bit two's complement with 25 fraction bits. A neuron's
// sum is the saturated sum of the products, each rounded down to 25
// fraction bits. The activation table holds the log-sigmoid sampled at the
// middle of each of the 1024 input intervals of width 1/8 over [-64, 64).
package tb_nocnn_ref_pkg;

  localparam real SCALE = 33554432.0;   // 2**25

  function automatic int to_fix(real r);
    return int'($rtoi(r * SCALE + (r >= 0 ? 0.5 : -0.5)));
  endfunction

  function automatic real rand_real(real lo, real hi);
    return lo + (hi - lo) * real'($urandom % 100000) / 100000.0;
  endfunction

  // LUT word k for a table of 2**aw words over [-64, 64)
  function automatic int lut_word(int k, int aw);
    real step, x;
    step = 128.0 / real'(1 << aw);
    x = -64.0 + (real'(k) + 0.5) * step;
    return to_fix(1.0 / (1.0 + $exp(-x)));
  endfunction

  function automatic int lut_index(int s, int aw);
    longint u;
    u = longint'(s) + 64'sd2147483648;      // offset binary
    return int'(u >>> (32 - aw));
  endfunction

  function automatic int sat32(longint v);
    if (v > 64'sd2147483647) return 32'h7fffffff;
    if (v < -64'sd2147483648) return 32'h80000000;
    return int'(v);
  endfunction

  function automatic longint mul_fix(int w, int x);
    longint p;
    p = longint'(w) * longint'(x);
    return p >>> 25;
  endfunction

endpackage
