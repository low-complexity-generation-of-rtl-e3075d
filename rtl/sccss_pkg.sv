// sccss_pkg: shared definitions for the SCCSS (scalable complete complementary
// set of sequences) coefficient generator and correlator.
//
// An order-2^n SCCSS holds 2^n codes of 4^n chips each. A correlator for one
// code is a 4^n-tap FIR filter built as a tree of two-port adder/subtractors.
// Each adder/subtractor is steered by one "modified" coefficient c_hat(t):
// 0 selects A + B, 1 selects A - B. The modified coefficient of tap t depends
// only on the position l of the least significant set bit of t:
//
//   c_hat(t) = t[l+n]               0   <= l <= n-1
//            = t[l+1] ^ k[l-n]      n   <= l <= 2n-2
//            = k[n-1]               l  == 2n-1
//            = 0                    t  == 0
//
// sccss_mod_coeff() evaluates this rule. It is written for any order up to
// MAX_ORD; the callers pass the order n and zero-extended t and k.
package sccss_pkg;

  localparam int unsigned MAX_ORD = 16;

  typedef logic [2*MAX_ORD-1:0] tidx_t;   // chip / tap index, zero-extended
  typedef logic [MAX_ORD-1:0]   kidx_t;   // code index, zero-extended

  // Modified 2-port adder/subtractor coefficient of tap t of code k, order 2^n.
  // The loop runs from the top bit down so that the lowest set bit of t decides.
  function automatic logic sccss_mod_coeff(input int unsigned n, input tidx_t t, input kidx_t k);
    logic c;
    c = 1'b0;
    for (int l = 2*MAX_ORD-1; l >= 0; l--) begin
      if (l < 2*int'(n) && t[l]) begin
        if (l <= int'(n) - 1)
          c = t[l+int'(n)];
        else if (l <= 2*int'(n) - 2)
          c = t[l+1] ^ k[l-int'(n)];
        else
          c = k[l-int'(n)];
      end
    end
    return c;
  endfunction

  // Number of taps of the correlator for a set of order 2^n: 4^n chips per code.
  function automatic int unsigned sccss_taps(input int unsigned n);
    return 32'd1 << (2*n);
  endfunction

endpackage
