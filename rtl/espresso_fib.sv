// Fibonacci-configured Espresso (Espresso-F) keystream generator.
//
// State: two Fibonacci NFSRs in one 256-bit vector, bits 0..217 and bits
// 218..255. Only the top bit of each is computed; all other bits shift:
//   f_255 = x0 ^ x12 ^ x48 ^ x115 ^ x133 ^ x213
//         ^ x41x70 ^ x46x87 ^ x52x110 ^ x55x130 ^ x62x157 ^ x74x183
//         ^ x87x110x130x157
//   f_217 = x218 ^ x3x32 ^ x8x49 ^ x14x72 ^ x17x92 ^ x24x119 ^ x36x145
//         ^ x49x72x92x119
// These are the Galois functions of Espresso with every monomial moved to
// the top of its register (indices raised by the distance moved). The
// filter h(x) is the Espresso filter applied to this state, and during
// initialisation h is XORed into f_255 and f_217. Espresso-F is a cipher
// of its own: its keystream differs from Galois Espresso's.
//
// Phases as in espresso_ctrl: 256 load cycles (key, IV, padding shifted in
// from the top), 256 initialisation rounds one per cycle, then W rounds
// per cycle in WORK.
// Running phase: "first filter then update". The W filter copies
// h^0..h^(W-1) read the state of rounds T..T+W-1, and the W copies
// f_255^j, f_217^j of the feedback functions write the top W bits of each
// register. Copy f_255^j reads x213+j, which for j >= 5 is a bit that
// f_217^(j-5) produces in the same cycle, so wider words chain the two
// functions; this is obtained here by evaluating W serial rounds as a
// chain of combinational steps. ks[j] = h(x^(T+j)); the first word, z_0..
// z_(W-1), is valid in the first WORK cycle.
//
// With W = 1 and USE_SRL set, untapped runs of the register are built as
// shift-register fragments (fsr_reg). Reset style and the zeroing of ks
// outside WORK are this design's choices.
module espresso_fib
  import espresso_pkg::*;
#(
  parameter int unsigned W       = 16,   // keystream bits per clock (1..64)
  parameter bit          USE_SRL = 1'b1, // SRL fragments for W = 1
  parameter int unsigned SRL_MIN = 3,    // shortest fragment put in an SRL
  parameter int unsigned SRL_MAX = 32    // SRL primitive length
) (
  input  logic         clk,
  input  logic         rst,      // synchronous, active high
  input  logic         din,      // serial key / IV bit, read while load
  output logic [W-1:0] ks,       // keystream word, ks[0] oldest
  output logic         ks_valid,
  output logic         load,
  output logic         work
);
  if (W < 1 || W > 64) begin : g_bad_w
    $error("espresso_fib: W must be 1..64");
  end

  fsm_t             st;
  logic [CNT_W-1:0] cnt;
  state_t           x, nxt;
  state_t           s [W+1];     // states of rounds T .. T+W
  logic [W-1:0]     hw;
  logic             h0;

  espresso_ctrl #(.HAS_SET(1'b0)) u_ctrl (
    .clk, .rst, .state(st), .cnt, .load, .work
  );

  // One round of Espresso-F; fb is the initialisation feedback.
  function automatic state_t fib_step(state_t v, logic fb);
    state_t y = {1'b0, v[N-1:1]};
    y[255] = v[0] ^ v[12] ^ v[48] ^ v[115] ^ v[133] ^ v[213]
           ^ (v[41] & v[70]) ^ (v[46] & v[87]) ^ (v[52] & v[110])
           ^ (v[55] & v[130]) ^ (v[62] & v[157]) ^ (v[74] & v[183])
           ^ (v[87] & v[110] & v[130] & v[157]) ^ fb;
    y[217] = v[218] ^ (v[3] & v[32]) ^ (v[8] & v[49]) ^ (v[14] & v[72])
           ^ (v[17] & v[92]) ^ (v[24] & v[119]) ^ (v[36] & v[145])
           ^ (v[49] & v[72] & v[92] & v[119]) ^ fb;
    return y;
  endfunction

  assign s[0] = x;
  for (genvar j = 0; j < W; j++) begin : g_round
    espresso_filter u_h (.x(s[j]), .z(hw[j]));
    assign s[j+1] = fib_step(s[j], 1'b0);
  end
  assign h0 = hw[0];

  always_comb begin
    unique case (st)
      ST_LOAD: nxt = {load_bit(cnt, din), x[N-1:1]};
      ST_INIT: nxt = fib_step(x, h0);
      ST_WORK: nxt = s[W];
      default: nxt = x;
    endcase
  end

  fsr_reg #(
    .TERM    (fib_terminal_mask()),
    .USE_SRL (USE_SRL && W == 1),
    .SRL_MIN (SRL_MIN),
    .SRL_MAX (SRL_MAX)
  ) u_state (
    .clk (clk),
    .en  (st inside {ST_LOAD, ST_INIT, ST_WORK}),
    .nxt (nxt),
    .q   (x)
  );

  assign ks_valid = work;
  assign ks       = ks_valid ? hw : '0;
endmodule
