// tb_sccss_ref_pkg: reference model of SCCSS codes for the testbenches.
//
// Codes are built from the closed form of the Golay-paired Hadamard matrices:
// chip t = i + 2^n j of code k is H_k(i, j) = (-1)^G with
//   G = xor_{r=0}^{n-2} (j[r+1] ^ i[r] ^ k[r]) & j[r]  ^  (i[n-1] ^ k[n-1]) & j[n-1].
// The modified tree coefficient is derived from the chips themselves:
// (-1)^c_hat(0) = c(0), and (-1)^c_hat(t) = c(t) c(m) for t > 0, where m is t
// with its lowest set bit cleared. Nothing here uses the closed-form rule for
// c_hat that the design implements.
package tb_sccss_ref_pkg;

  // Chip of code k at index t, order 2^n, as +1 / -1.
  function automatic int ref_chip(input int n, input int t, input int k);
    int i, j, g;
    i = t % (1 << n);
    j = t >> n;
    g = 0;
    for (int r = 0; r <= n - 2; r++)
      g ^= (((j >> (r + 1)) ^ (i >> r) ^ (k >> r)) & (j >> r)) & 1;
    g ^= (((i >> (n - 1)) ^ (k >> (n - 1))) & (j >> (n - 1))) & 1;
    return (g != 0) ? -1 : 1;
  endfunction

  // Modified coefficient of tap t of code k, from the chips.
  function automatic bit ref_mod_coeff(input int n, input int t, input int k);
    if (t == 0) return ref_chip(n, 0, k) < 0;
    return (ref_chip(n, t, k) * ref_chip(n, t & (t - 1), k)) < 0;
  endfunction

endpackage
