// Galois-configured Espresso keystream generator (original Espresso).
//
// State: a 256-bit Galois NFSR. Fourteen bits (the update set
// U = {193,197,...,217, 231,235,...,255}) are written by their own
// feedback function f_a; every other bit takes the bit above it. During
// initialisation the filter output h(x) is XORed into f_255 and f_217.
//
// Phases (see espresso_ctrl): LOAD shifts 256 bits in from the top, one per
// cycle (key, IV, then the ones/zero padding generated internally); INIT
// clocks the register 256 times, one round per cycle, with h fed back;
// WORK advances W rounds per cycle and emits W keystream bits per cycle.
//
// Running phase (hybrid architecture): each updated bit a has W parallel
// copies f_a^j, j = 0..W-1, whose variable indices are raised by j; copy
// f_a^j writes bit a-(W-1-j), and all other bits take x[i+W]. This is exact
// as long as no copy reads a bit that another function writes in the same
// cycle, which limits W to 4 for this register (asserted).
// The filter cannot look ahead (some of its taps are updated bits), so the
// generator first updates and then filters: the word presented in a cycle
// whose state is x^T holds h(x^(T-W+1)) .. h(x^T), computed as shifted
// copies h^-k(x) with indices lowered by k. ks[0] is the oldest bit.
//
// Timing: ks_valid rises with work for W = 1, where the first bit is
// h(x^256), the first keystream bit z_0. For W > 1 the first WORK cycle
// carries no complete word; ks_valid rises one cycle later and the words
// are z_1..z_W, z_(W+1)..z_2W, ...: the W-wide stream is the serial stream
// without its first bit z_0. ks is held at zero while ks_valid is low.
//
// With W = 1 and USE_SRL set, the untapped runs of the register are built
// as shift-register fragments (fsr_reg); the parallel register (W > 1)
// moves W bits per cycle and is always built of flip-flops.
// Feedback functions, phases, parallel update and update-then-filter order
// follow the cipher and its hybrid architecture; the reset style, the
// ks_valid output and the zeroing of ks outside valid cycles are this
// design's choices.
module espresso_galois
  import espresso_pkg::*;
#(
  parameter int unsigned W       = 4,   // keystream bits per clock (1..4)
  parameter bit          USE_SRL = 1'b1,// SRL fragments for W = 1
  parameter int unsigned SRL_MIN = 4,   // shortest fragment put in an SRL
  parameter int unsigned SRL_MAX = 32   // SRL primitive length
) (
  input  logic         clk,
  input  logic         rst,      // synchronous, active high
  input  logic         din,      // serial key / IV bit, read while load
  output logic [W-1:0] ks,       // keystream word, ks[0] oldest
  output logic         ks_valid,
  output logic         load,     // high while key / IV bits are taken
  output logic         work      // high in the running phase
);
  if (W < 1 || W > 4) begin : g_bad_w
    $error("espresso_galois: W must be 1..4");
  end

  fsm_t             st;
  logic [CNT_W-1:0] cnt;
  state_t           x, nxt;
  logic             h0;
  logic [W-1:0]     hw;
  logic             seen_work;

  localparam state_t UPD = galois_update_mask();

  espresso_ctrl #(.HAS_SET(1'b0)) u_ctrl (
    .clk, .rst, .state(st), .cnt, .load, .work
  );

  // w rounds of the Galois register in one step (Formula-9 form). For w = 1
  // this is the serial update; fb is the initialisation feedback.
  function automatic state_t galois_update(state_t s, int w, logic fb);
    state_t y;
    for (int i = 0; i < int'(N); i++)
      y[i] = (i + w < int'(N)) ? s[i + w] : 1'b0;
    // bit a-(w-1-j) takes the shift input of f_a^j instead of s[i+w]
    for (int a = 0; a < int'(N); a++)
      if (UPD[a])
        for (int j = 0; j < w; j++)
          y[a - (w - 1 - j)] = (a == int'(N) - 1) ? 1'b0 : s[a + 1 + j];
    for (int t = 0; t < int'(NTERMS); t++)
      for (int j = 0; j < w; j++)
        y[TERM_A[t] - (w - 1 - j)] ^= term_val(s, t, j);
    y[255] ^= fb;
    y[217] ^= fb;
    return y;
  endfunction

  espresso_filter u_h0 (.x(x), .z(h0));

  for (genvar j = 0; j < W; j++) begin : g_filt
    espresso_filter u_h (.x(x << (W - 1 - j)), .z(hw[j]));
  end

  always_comb begin
    unique case (st)
      ST_LOAD: nxt = {load_bit(cnt, din), x[N-1:1]};
      ST_INIT: nxt = galois_update(x, 1, h0);
      ST_WORK: nxt = galois_update(x, W, 1'b0);
      default: nxt = x;
    endcase
  end

  fsr_reg #(
    .TERM    (galois_terminal_mask()),
    .USE_SRL (USE_SRL && W == 1),
    .SRL_MIN (SRL_MIN),
    .SRL_MAX (SRL_MAX)
  ) u_state (
    .clk (clk),
    .en  (st inside {ST_LOAD, ST_INIT, ST_WORK}),
    .nxt (nxt),
    .q   (x)
  );

  always_ff @(posedge clk)
    if (rst) seen_work <= 1'b0;
    else if (work) seen_work <= 1'b1;

  assign ks_valid = work && (W == 1 || seen_work);
  assign ks       = ks_valid ? hw : '0;
endmodule
