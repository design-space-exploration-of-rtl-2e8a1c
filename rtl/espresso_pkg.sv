// Shared definitions of the Espresso keystream generators.
//
// Espresso keeps a 256-bit state x[255:0]. It is loaded with a 128-bit key
// k, a 96-bit IV v and fixed padding (x[223:0] = {v, k}, x[254:224] all ones,
// x[255] = 0), clocked 256 times with the filter output fed back, and then
// emits the filter output h(x) as keystream.
//
// This package holds what the three generator variants share:
//   * the controller states and counter width;
//   * the table of the 14 Galois feedback functions (every monomial except
//     the plain shift input x[a+1]), from which the Galois update, the
//     Espresso-L compensation network and the SRL fragment masks are built;
//   * the serial load pattern (key and IV bits from the input pin, padding
//     generated here);
//   * constant functions that give the masks of "terminal" state bits, the
//     bits that are read or written by logic and therefore must stay
//     flip-flops; the untapped runs between them may become shift-register
//     LUTs on an FPGA.
// The feedback functions, filter taps and load layout follow the cipher
// definition; the load order (bit c of the serial stream lands in x[c]) is
// this design's choice.
package espresso_pkg;

  localparam int unsigned N        = 256;  // state bits
  localparam int unsigned KEY_BITS = 128;
  localparam int unsigned IV_BITS  = 96;
  localparam int unsigned CNT_W    = 9;    // cycle counter width

  typedef logic [N-1:0] state_t;

  // Controller states. SET is used only by Espresso-L.
  typedef enum logic [2:0] {
    ST_IDLE = 3'd0,
    ST_LOAD = 3'd1,
    ST_SET  = 3'd2,
    ST_INIT = 3'd3,
    ST_WORK = 3'd4
  } fsm_t;

  // ---------------------------------------------------------------------
  // Galois feedback monomials. Term t belongs to the function f_a with
  // a = TERM_A[t] and is the product of the state bits TERM_V[t][*]
  // (entries of -1 are unused). f_a(x) = x[a+1] ^ (its terms), except
  // f_255(x) = x[0] ^ x[41]x[70], whose x[0] is listed as a term.
  // ---------------------------------------------------------------------
  localparam int unsigned NTERMS = 20;
  localparam int TERM_A [NTERMS] = '{
    255, 255, 251, 251, 247, 247, 243, 243, 239, 239,
    235, 231, 231, 217, 213, 209, 205, 201, 197, 193
  };
  localparam int TERM_V [NTERMS][4] = '{
    '{  0,  -1,  -1, -1}, '{ 41,  70,  -1, -1},   // f_255
    '{ 42,  83,  -1, -1}, '{  8,  -1,  -1, -1},   // f_251
    '{ 44, 102,  -1, -1}, '{ 40,  -1,  -1, -1},   // f_247
    '{ 43, 118,  -1, -1}, '{103,  -1,  -1, -1},   // f_243
    '{ 46, 141,  -1, -1}, '{117,  -1,  -1, -1},   // f_239
    '{ 67,  90, 110, 137},                        // f_235
    '{ 50, 159,  -1, -1}, '{189,  -1,  -1, -1},   // f_231
    '{  3,  32,  -1, -1},                         // f_217
    '{  4,  45,  -1, -1},                         // f_213
    '{  6,  64,  -1, -1},                         // f_209
    '{  5,  80,  -1, -1},                         // f_205
    '{  8, 103,  -1, -1},                         // f_201
    '{ 29,  52,  72,  99},                        // f_197
    '{ 12, 121,  -1, -1}                          // f_193
  };

  // Update set U of the Galois register, as a bit mask.
  function automatic state_t galois_update_mask();
    state_t m = '0;
    for (int t = 0; t < NTERMS; t++) m[TERM_A[t]] = 1'b1;
    return m;
  endfunction

  // Value of term t with every variable index raised by sh. t is an int
  // for the callers' loop variables; only values 0..NTERMS-1 occur, so lint
  // reports its upper bits as unused.
  function automatic logic term_val(state_t x, int t, int sh);
    logic p = 1'b1;
    for (int k = 0; k < 4; k++)
      if (TERM_V[t][k] >= 0) p &= x[TERM_V[t][k] + sh];
    return p;
  endfunction

  // Filter taps of h(x).
  localparam int unsigned NHTAPS = 20;
  localparam int HTAPS [NHTAPS] = '{
    80, 99, 137, 227, 222, 187, 243, 217, 247, 231,
    213, 235, 255, 251, 181, 239, 174, 44, 164, 29
  };

  // Bits of the Galois register that must stay flip-flops: updated bits,
  // feedback variables and filter taps. The shift input x[a+1] of f_a is
  // not terminal: it is the last bit of the run above a and leaves a shift
  // register LUT through its output pin.
  function automatic state_t galois_terminal_mask();
    state_t m = galois_update_mask();
    for (int t = 0; t < NTERMS; t++)
      for (int k = 0; k < 4; k++)
        if (TERM_V[t][k] >= 0) m[TERM_V[t][k]] = 1'b1;
    for (int j = 0; j < NHTAPS; j++) m[HTAPS[j]] = 1'b1;
    return m;
  endfunction

  // Variables of the two Fibonacci feedback functions of Espresso-F.
  localparam int unsigned NFVARS = 31;
  localparam int FIB_VARS [NFVARS] = '{
    0, 3, 8, 12, 14, 17, 24, 32, 36, 41, 46, 48, 49, 52, 55, 62, 70,
    72, 74, 87, 92, 110, 115, 119, 130, 133, 145, 157, 183, 213, 218
  };

  // Terminal bits of the Espresso-F register: the two updated bits, the
  // feedback variables and the filter taps.
  function automatic state_t fib_terminal_mask();
    state_t m = '0;
    m[217] = 1'b1;
    m[255] = 1'b1;
    for (int j = 0; j < NFVARS; j++) m[FIB_VARS[j]] = 1'b1;
    for (int j = 0; j < NHTAPS; j++) m[HTAPS[j]] = 1'b1;
    return m;
  endfunction

  // Bit shifted into x[255] in load cycle cnt (0..255): key bits for
  // cycles 0..127, IV bits for 128..223 (both from the serial input),
  // ones for 224..254 and a zero for cycle 255. After 256 shifts the bit
  // of cycle c sits in x[c].
  function automatic logic load_bit(logic [CNT_W-1:0] cnt, logic din);
    if (cnt < CNT_W'(KEY_BITS + IV_BITS)) return din;
    else if (cnt < CNT_W'(N - 1))         return 1'b1;
    else                                  return 1'b0;
  endfunction

endpackage
