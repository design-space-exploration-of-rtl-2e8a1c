// Espresso design-space top: the three generator variants side by side.
//
// Galois Espresso (hybrid, GW bits per clock), Fibonacci Espresso-F
// (FW bits per clock) and the LFSR filter generator Espresso-L (LW bits
// per clock) share only clock and reset; each has its own serial key/IV
// input, keystream word, valid flag and load/work flags, so they can be
// driven and compared independently. Galois Espresso and Espresso-L
// produce the same keystream from the same key and IV (the W-wide Galois
// stream starts at z_1); Espresso-F is a different cipher.
// Default widths are the widest each variant is built for: 4 for the
// Galois register, 16 for the two Fibonacci variants. The grouping into one
// top is this design's choice.
module espresso_top #(
  parameter int unsigned GW = 4,
  parameter int unsigned FW = 16,
  parameter int unsigned LW = 16
) (
  input  logic          clk,
  input  logic          rst,
  // Galois Espresso
  input  logic          g_din,
  output logic [GW-1:0] g_ks,
  output logic          g_ks_valid,
  output logic          g_load,
  output logic          g_work,
  // Espresso-F
  input  logic          f_din,
  output logic [FW-1:0] f_ks,
  output logic          f_ks_valid,
  output logic          f_load,
  output logic          f_work,
  // Espresso-L
  input  logic          l_din,
  output logic [LW-1:0] l_ks,
  output logic          l_ks_valid,
  output logic          l_load,
  output logic          l_work
);
  espresso_galois #(.W(GW)) u_galois (
    .clk, .rst, .din(g_din), .ks(g_ks), .ks_valid(g_ks_valid),
    .load(g_load), .work(g_work)
  );
  espresso_fib #(.W(FW)) u_fib (
    .clk, .rst, .din(f_din), .ks(f_ks), .ks_valid(f_ks_valid),
    .load(f_load), .work(f_work)
  );
  espresso_lfsr #(.W(LW)) u_lfsr (
    .clk, .rst, .din(l_din), .ks(l_ks), .ks_valid(l_ks_valid),
    .load(l_load), .work(l_work)
  );
endmodule
