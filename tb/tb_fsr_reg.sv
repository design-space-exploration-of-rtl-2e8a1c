// Testbench of fsr_reg: the Galois and the Espresso-F terminal masks with
// the fragment thresholds 2..5 and the 16-bit (Spartan-3) and 32-bit SRL
// limits, against a flip-flop reference register. Every cycle the next
// state of each register shifts its own unmarked bits and gives the same
// random values to the marked bits, with a random clock enable; once every
// bit has been flushed, the SRL-mapped registers must hold exactly the
// same state as the reference.
module tb_fsr_reg;
  import espresso_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic en;

  localparam state_t GT = galois_terminal_mask();
  localparam state_t FT = fib_terminal_mask();

  state_t gref, g2, g4, g5, g16, fref, f2, f3, f16;
  state_t r;   // random values for the marked bits, shared by all

  // Next state of a register: its own bits shifted down, marked bits random.
  function automatic state_t mk(state_t q, state_t m, state_t rnd);
    state_t y = {1'b0, q[255:1]};
    for (int i = 0; i < 256; i++) if (m[i]) y[i] = rnd[i];
    return y;
  endfunction

  fsr_reg #(.TERM(GT), .USE_SRL(1'b0))            rg  (.clk, .en, .nxt(mk(gref, GT, r)), .q(gref));
  fsr_reg #(.TERM(GT), .SRL_MIN(2))               ug2 (.clk, .en, .nxt(mk(g2,   GT, r)), .q(g2));
  fsr_reg #(.TERM(GT), .SRL_MIN(4))               ug4 (.clk, .en, .nxt(mk(g4,   GT, r)), .q(g4));
  fsr_reg #(.TERM(GT), .SRL_MIN(5))               ug5 (.clk, .en, .nxt(mk(g5,   GT, r)), .q(g5));
  fsr_reg #(.TERM(GT), .SRL_MIN(2), .SRL_MAX(16)) ug16(.clk, .en, .nxt(mk(g16,  GT, r)), .q(g16));
  fsr_reg #(.TERM(FT), .USE_SRL(1'b0))            rf  (.clk, .en, .nxt(mk(fref, FT, ~r)), .q(fref));
  fsr_reg #(.TERM(FT), .SRL_MIN(2))               uf2 (.clk, .en, .nxt(mk(f2,   FT, ~r)), .q(f2));
  fsr_reg #(.TERM(FT), .SRL_MIN(3))               uf3 (.clk, .en, .nxt(mk(f3,   FT, ~r)), .q(f3));
  fsr_reg #(.TERM(FT), .SRL_MIN(2), .SRL_MAX(16)) uf16(.clk, .en, .nxt(mk(f16,  FT, ~r)), .q(f16));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  always @(negedge clk)
    for (int k = 0; k < 8; k++) r[k*32 +: 32] = $urandom;

  initial begin
    en = 1;
    // 300 enabled cycles flush every bit of every register
    repeat (300) @(negedge clk);
    repeat (3000) begin
      @(negedge clk);
      check(g2 == gref && g4 == gref && g5 == gref && g16 == gref, "Galois mask mappings");
      check(f2 == fref && f3 == fref && f16 == fref, "Espresso-F mask mappings");
      en = ($urandom % 3) != 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
