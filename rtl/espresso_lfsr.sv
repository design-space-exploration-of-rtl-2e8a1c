// Espresso-L: Espresso rewritten as an LFSR filter generator.
//
// State: a 256-bit Fibonacci LFSR x with the single linear feedback
//   x255' = x0 ^ x12 ^ x48 ^ x115 ^ x133 ^ x213;
// every other bit takes the bit above it. All nonlinear feedback of the
// Galois register has moved into the filter: the filter reads the
// compensated state x_hat = x ^ C(x) (espresso_comp), which equals the
// Galois Espresso state of the same round, so Espresso-L produces exactly
// the Galois Espresso keystream. The filter reads 121 distinct LFSR bits.
//
// Phases (espresso_ctrl with its SET state):
//   LOAD  256 cycles: the Galois initial state g (key, IV, padding) is
//         shifted in from the top, as for the other variants;
//   SET   1 cycle: g is turned into the LFSR state l with l ^ C(l) = g.
//         C only reads bits below 213, and the compensation of bits
//         194..212 only reads bits below 194, so l = g ^ C(g ^ C(g));
//         both compensation passes are combinational in this one cycle;
//   INIT  256 rounds, one per cycle. The filter output h(x_hat) is XORed
//         into x255 and x217, which keeps x_hat equal to the Galois state
//         with its initialisation feedback;
//   WORK  W rounds per cycle, "first filter then update": ks[j] is
//         h(x_hat) of round T+j, valid from the first WORK cycle, starting
//         with z_0.
// The register is built from flip-flops: in SET every bit is loaded with
// its own value, so no bit is a plain shift.
//
// The linear feedback, the SET state and its place between LOAD and INIT,
// and the compensated filter follow the LFSR-filter-generator description.
// The two-pass evaluation in SET, the feedback of h into x217 during INIT,
// the reset style and the zeroing of ks outside WORK are this design's
// choices, made so that the keystream equals that of Galois Espresso.
module espresso_lfsr
  import espresso_pkg::*;
#(
  parameter int unsigned W = 16   // keystream bits per clock (1..64)
) (
  input  logic         clk,
  input  logic         rst,       // synchronous, active high
  input  logic         din,       // serial key / IV bit, read while load
  output logic [W-1:0] ks,        // keystream word, ks[0] oldest
  output logic         ks_valid,
  output logic         load,
  output logic         work
);
  if (W < 1 || W > 64) begin : g_bad_w
    $error("espresso_lfsr: W must be 1..64");
  end

  fsm_t             st;
  logic [CNT_W-1:0] cnt;
  state_t           x, nxt;
  state_t           s [W+1];     // LFSR states of rounds T .. T+W
  logic [W-1:0]     hw;
  state_t           x1, x2;

  espresso_ctrl #(.HAS_SET(1'b1)) u_ctrl (
    .clk, .rst, .state(st), .cnt, .load, .work
  );

  // One LFSR round; fb is the initialisation feedback.
  function automatic state_t lfsr_step(state_t v, logic fb);
    state_t y = {1'b0, v[N-1:1]};
    y[255] = v[0] ^ v[12] ^ v[48] ^ v[115] ^ v[133] ^ v[213] ^ fb;
    y[217] = v[218] ^ fb;
    return y;
  endfunction

  assign s[0] = x;
  for (genvar j = 0; j < W; j++) begin : g_round
    state_t xh;
    espresso_comp   u_c (.x(s[j]), .x_hat(xh));
    espresso_filter u_h (.x(xh), .z(hw[j]));
    assign s[j+1] = lfsr_step(s[j], 1'b0);
  end

  // SET: two compensation passes; x1 ^ x2 is C(x1).
  espresso_comp u_set1 (.x(x),  .x_hat(x1));
  espresso_comp u_set2 (.x(x1), .x_hat(x2));

  always_comb begin
    unique case (st)
      ST_LOAD: nxt = {load_bit(cnt, din), x[N-1:1]};
      ST_SET:  nxt = x ^ x1 ^ x2;
      ST_INIT: nxt = lfsr_step(x, hw[0]);
      ST_WORK: nxt = s[W];
      default: nxt = x;
    endcase
  end

  always_ff @(posedge clk)
    if (st != ST_IDLE) x <= nxt;

  assign ks_valid = work;
  assign ks       = ks_valid ? hw : '0;
endmodule
