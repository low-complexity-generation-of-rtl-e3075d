// sccss_coeff_gen: modified-coefficient generator for an SCCSS of order 2^N_ORD.
//
// Given a chip (tap) index t of 2*N_ORD bits and a code index k of N_ORD bits,
// it returns on the next rising clock edge the coefficient c_hat(t) that steers
// the adder/subtractor of tap t in the tree correlator (0: add, 1: subtract).
// The logic is a priority decode of the least significant set bit l of t:
// for a set bit in the lower half of t the result is bit t[l+N_ORD]; in the
// upper half it is t[l+1] xor k[l-N_ORD], and at the top bit it is k[N_ORD-1];
// t = 0 gives 0. No counter or table is involved, so the block behaves like a
// ROM of 2^N_ORD words of 4^N_ORD bits without storing any of it.
//
// Timing: one register stage, output c valid one clock after t and k.
// The rule and the single output register follow the published generator; the
// generic order parameter is this design's generalisation of its n = 3 example.
// No reset: the output is fully determined one clock after the inputs.
module sccss_coeff_gen
  import sccss_pkg::*;
#(
  parameter int unsigned N_ORD = 3            // order 2^N_ORD: 8 codes of 64 chips
) (
  input  logic                 clk,
  input  logic [2*N_ORD-1:0]   t,             // chip / tap index
  input  logic [N_ORD-1:0]     k,             // code index
  output logic                 c              // modified coefficient, registered
);

  // The rule in sccss_pkg handles orders 2^1 .. 2^MAX_ORD.
  if (N_ORD < 1 || N_ORD > MAX_ORD) begin : g_bad_order
    $error("sccss_coeff_gen: N_ORD must lie between 1 and %0d", MAX_ORD);
  end

  logic c_next;

  always_comb begin
    c_next = sccss_mod_coeff(N_ORD, tidx_t'(t), kidx_t'(k));
  end

  always_ff @(posedge clk) begin
    c <= c_next;
  end

endmodule
