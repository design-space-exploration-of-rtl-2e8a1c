// Feedback shift register state with selectable SRL fragment mapping.
//
// Holds the 256-bit state of a serial Espresso register. The caller gives
// the complete next state nxt every cycle; en is the clock enable.
//
// With USE_SRL = 0 every bit is a flip-flop loaded from nxt.
//
// With USE_SRL = 1 the register is split as in the consecutive register
// fragment method: bits marked in TERM (updated, feedback-tapped or
// filter-tapped bits) stay flip-flops, and each maximal run R(a,b) of
// unmarked bits between two terminal bits a and b (valid length b-a-1) is
// built as srl_fragment shift registers when its length is at least
// SRL_MIN. A run longer than SRL_MAX is cut into SRL_MAX-bit pieces from
// its low end; a leftover piece shorter than SRL_MIN stays flip-flops.
// Runs shorter than SRL_MIN stay flip-flops. SRL bits ignore nxt and shift
// by themselves, so the mapping is only valid when the caller's nxt is a
// plain shift (nxt[i] == q[i+1]) for every unmarked bit; an assertion
// checks this. Bit 255 must be marked.
//
// The fragment rule, the length thresholds and the 16/32-bit SRL limits
// follow the area-optimisation method; the low-end cutting of over-long
// runs is this design's choice.
module fsr_reg
  import espresso_pkg::*;
#(
  parameter state_t      TERM    = '1,   // terminal (flip-flop) bits
  parameter bit          USE_SRL = 1'b1, // map untapped runs onto SRLs
  parameter int unsigned SRL_MIN = 4,    // shortest run mapped onto an SRL
  parameter int unsigned SRL_MAX = 32    // longest SRL primitive
) (
  input  logic   clk,
  input  logic   en,
  input  state_t nxt,
  output state_t q
);
  // Lowest / highest bit of the unmarked run holding bit i.
  function automatic int run_lo(state_t m, int i);
    int k = i;
    while (k > 0 && !m[k-1]) k--;
    return k;
  endfunction
  function automatic int run_hi(state_t m, int i);
    int k = i;
    while (k < int'(N) - 1 && !m[k+1]) k++;
    return k;
  endfunction
  // Length of the SRL piece that starts at bit s of a run ending at hi.
  function automatic int piece_len(int s, int hi);
    return (hi - s + 1 < int'(SRL_MAX)) ? hi - s + 1 : int'(SRL_MAX);
  endfunction

  for (genvar i = 0; i < N; i++) begin : g_bit
    localparam int LO   = run_lo(TERM, i);
    localparam int HI   = run_hi(TERM, i);
    localparam int OFF  = (i - LO) % int'(SRL_MAX);          // offset in piece
    localparam int PS   = i - OFF;                           // piece start
    localparam int PLEN = piece_len(PS, HI);
    localparam bit IS_SRL = USE_SRL && !TERM[i] && (PLEN >= int'(SRL_MIN));

    if (!IS_SRL) begin : g_ff
      (* shreg_extract = "no" *) logic r;
      always_ff @(posedge clk)
        if (en) r <= nxt[i];
      assign q[i] = r;
    end else if (OFF == 0) begin : g_srl
      srl_fragment #(.LEN(PLEN)) u_frag (
        .clk (clk),
        .en  (en),
        .d   (q[i + PLEN]),
        .q   (q[i +: PLEN])
      );
    end
  end

  // The caller must only shift the bits that live in SRLs.
  for (genvar i = 0; i < N - 1; i++) begin : g_chk
    if (USE_SRL && !TERM[i]) begin : g_a
      a_shift: assert property (@(posedge clk) en |-> nxt[i] == q[i+1]);
    end
  end

  initial assert (TERM[N-1]) else $error("fsr_reg: bit 255 must be terminal");
endmodule
