// Espresso keystream filter h(x).
//
// A purely combinational 20-input Boolean function of the 256-bit state:
// six state bits enter linearly, seven pairs as products, and one
// six-variable product:
//   h = x80 ^ x99 ^ x137 ^ x227 ^ x222 ^ x187
//     ^ x243 x217 ^ x247 x231 ^ x213 x235 ^ x255 x251 ^ x181 x239
//     ^ x174 x44 ^ x164 x29 ^ x255 x247 x243 x213 x181 x174
// The grouping into the partial sums p1..p6 below is the one of the
// original ASIC pipeline; on FPGAs the function fits in two LUT levels, so
// no pipeline registers are inserted and z is valid in the same cycle as x.
// Shifted versions h^j (indices moved by j) are obtained by the caller by
// handing in a shifted state vector.
// Only the 20 tap bits of x are read; taking the whole state keeps the
// callers simple, and lint reports the other 236 bits as unused.
module espresso_filter
  import espresso_pkg::*;
(
  input  state_t x,   // state (or shifted / compensated state)
  output logic   z    // filter output
);
  logic p1, p2, p3, p4, p5, p6;

  always_comb begin
    p1 = x[80] ^ x[99] ^ x[137] ^ x[227];
    p2 = x[222] ^ x[187] ^ (x[243] & x[217]);
    p3 = (x[247] & x[231]) ^ (x[213] & x[235]);
    p4 = (x[255] & x[251]) ^ (x[181] & x[239]);
    p5 = (x[174] & x[44]) ^ (x[164] & x[29]);
    p6 = x[255] & x[247] & x[243] & x[213] & x[181] & x[174];
    z  = (p1 ^ p2 ^ p3 ^ p4) ^ (p5 ^ p6);
  end
endmodule
