// Reference models of the three Espresso variants for the testbenches.
//
// Written bit by bit straight from the cipher equations, independently of
// the RTL tables: one round of the Galois register, of the Fibonacci
// register (Espresso-F) and of the Espresso-L LFSR, the filter h, the
// initial state, and serial keystream generators that run the 256
// initialisation rounds and then return n keystream bits z_0..z_(n-1).
package espresso_ref_pkg;

  typedef bit [255:0] st_t;

  function automatic bit ref_h(st_t x);
    return x[80] ^ x[99] ^ x[137] ^ x[227] ^ x[222] ^ x[187]
         ^ (x[243] & x[217]) ^ (x[247] & x[231]) ^ (x[213] & x[235])
         ^ (x[255] & x[251]) ^ (x[181] & x[239]) ^ (x[174] & x[44])
         ^ (x[164] & x[29])
         ^ (x[255] & x[247] & x[243] & x[213] & x[181] & x[174]);
  endfunction

  function automatic st_t ref_galois_round(st_t x, bit fb);
    st_t y;
    for (int i = 0; i < 255; i++) y[i] = x[i+1];
    y[255] = x[0]   ^ (x[41] & x[70]) ^ fb;
    y[251] = x[252] ^ (x[42] & x[83]) ^ x[8];
    y[247] = x[248] ^ (x[44] & x[102]) ^ x[40];
    y[243] = x[244] ^ (x[43] & x[118]) ^ x[103];
    y[239] = x[240] ^ (x[46] & x[141]) ^ x[117];
    y[235] = x[236] ^ (x[67] & x[90] & x[110] & x[137]);
    y[231] = x[232] ^ (x[50] & x[159]) ^ x[189];
    y[217] = x[218] ^ (x[3] & x[32]) ^ fb;
    y[213] = x[214] ^ (x[4] & x[45]);
    y[209] = x[210] ^ (x[6] & x[64]);
    y[205] = x[206] ^ (x[5] & x[80]);
    y[201] = x[202] ^ (x[8] & x[103]);
    y[197] = x[198] ^ (x[29] & x[52] & x[72] & x[99]);
    y[193] = x[194] ^ (x[12] & x[121]);
    return y;
  endfunction

  function automatic st_t ref_fib_round(st_t x, bit fb);
    st_t y;
    for (int i = 0; i < 255; i++) y[i] = x[i+1];
    y[255] = x[0] ^ x[12] ^ x[48] ^ x[115] ^ x[133] ^ x[213]
           ^ (x[41] & x[70]) ^ (x[46] & x[87]) ^ (x[52] & x[110])
           ^ (x[55] & x[130]) ^ (x[62] & x[157]) ^ (x[74] & x[183])
           ^ (x[87] & x[110] & x[130] & x[157]) ^ fb;
    y[217] = x[218] ^ (x[3] & x[32]) ^ (x[8] & x[49]) ^ (x[14] & x[72])
           ^ (x[17] & x[92]) ^ (x[24] & x[119]) ^ (x[36] & x[145])
           ^ (x[49] & x[72] & x[92] & x[119]) ^ fb;
    return y;
  endfunction

  function automatic st_t ref_lfsr_round(st_t x, bit fb);
    st_t y;
    for (int i = 0; i < 255; i++) y[i] = x[i+1];
    y[255] = x[0] ^ x[12] ^ x[48] ^ x[115] ^ x[133] ^ x[213] ^ fb;
    y[217] = x[218] ^ fb;
    return y;
  endfunction

  // Initial state: x[127:0] = key, x[223:128] = IV, ones, x[255] = 0.
  function automatic st_t ref_init_state(bit [127:0] key, bit [95:0] iv);
    st_t x;
    x[127:0]   = key;
    x[223:128] = iv;
    for (int i = 224; i < 255; i++) x[i] = 1'b1;
    x[255] = 1'b0;
    return x;
  endfunction

  // Serial Galois Espresso keystream z_0..z_(n-1).
  function automatic void ref_galois_ks(bit [127:0] key, bit [95:0] iv,
                                        int n, ref bit z[$]);
    st_t x = ref_init_state(key, iv);
    z.delete();
    for (int r = 0; r < 256; r++) x = ref_galois_round(x, ref_h(x));
    for (int r = 0; r < n; r++) begin
      z.push_back(ref_h(x));
      x = ref_galois_round(x, 1'b0);
    end
  endfunction

  // Serial Espresso-F keystream z_0..z_(n-1).
  function automatic void ref_fib_ks(bit [127:0] key, bit [95:0] iv,
                                     int n, ref bit z[$]);
    st_t x = ref_init_state(key, iv);
    z.delete();
    for (int r = 0; r < 256; r++) x = ref_fib_round(x, ref_h(x));
    for (int r = 0; r < n; r++) begin
      z.push_back(ref_h(x));
      x = ref_fib_round(x, 1'b0);
    end
  endfunction

  // Serial key / IV stream as the generators take it: bit c of the
  // stream is state bit c (key bits first, then IV bits).
  function automatic bit ref_load_bit(bit [127:0] key, bit [95:0] iv, int c);
    if (c < 128)      return key[c];
    else if (c < 224) return iv[c-128];
    else              return 1'b0;
  endfunction

endpackage
