// Espresso-L compensation network: x_hat = x ^ C(x).
//
// Espresso-L keeps a plain 256-bit LFSR x. Every nonlinear (and every
// non-shift linear) monomial m of a Galois feedback function f_a has been
// moved to the top of the register; in exchange, each bit p above a carries
// m "ahead of time", shifted by p-a-1. The compensation list of bit p is
// therefore
//   C[p] = XOR over a in U, a < p, a != 255, of m_a shifted by p-a-1,
// and x_hat = x ^ C(x) equals the state of the Galois register at the same
// round. Bits 0..193 need no compensation (C is empty there). Because all
// monomial variables are LFSR bits below 213, C(x) is an exact function of
// the LFSR state; the list for f_255 is empty.
//
// Purely combinational. The construction follows the compensation-list
// rule of the LFSR transformation; the closed form above (compensation
// evaluated on the LFSR state) is how this design applies it.
module espresso_comp
  import espresso_pkg::*;
(
  input  state_t x,      // LFSR state
  output state_t x_hat   // equivalent Galois state
);
  localparam int unsigned LOW = 193;   // lowest updated bit of U

  state_t c;                           // compensation lists C(x)

  always_comb begin
    c = '0;
    for (int p = LOW + 1; p < N; p++)
      for (int t = 0; t < NTERMS; t++)
        if (TERM_A[t] < p && TERM_A[t] != N - 1)
          c[p] ^= term_val(x, t, p - TERM_A[t] - 1);
    x_hat = x ^ c;
  end
endmodule
