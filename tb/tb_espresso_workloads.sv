// Testbench running the ten generator configurations compared in the
// Espresso design-space study: Galois Espresso x1 and x4, Espresso-F x1, x4,
// x8 and x16, and Espresso-L x1, x4, x8 and x16 (xW = W keystream bits per
// clock). The serial configurations use their default SRL fragment mapping.
//
// All ten are loaded with the same key/IV stream and run side by side, for
// several keys (the first all-zero key with all-one IV). tb_ks_check
// compares every word with the serial reference model, checks the 256-cycle
// load window and the latency to the first word, and checks the rate: after
// the first word, every work cycle carries W new bits. On top of that this
// testbench counts, per configuration, the keystream bits delivered in the
// first 32 work cycles after the first word and checks them against 32*W.
//
// Latencies from the first load cycle: 512 for the Galois x1 and Espresso-F
// generators, 513 for Galois x4 (its first word, z_1..z_4, comes one cycle
// into WORK) and for Espresso-L (one SET cycle).
module tb_espresso_workloads;
  import espresso_ref_pkg::*;

  localparam int NRUNS = 3;
  localparam int NCFG  = 10;
  localparam int RATE_CYC = 32;
  localparam int CW [NCFG] = '{1, 4, 1, 4, 8, 16, 1, 4, 8, 16};

  logic clk = 0, rst = 1;
  bit [127:0] key;
  bit [95:0]  iv;
  int li;
  logic din;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  logic [0:0]  ks_g1;  logic [3:0]  ks_g4;
  logic [0:0]  ks_f1;  logic [3:0]  ks_f4;  logic [7:0] ks_f8;  logic [15:0] ks_f16;
  logic [0:0]  ks_l1;  logic [3:0]  ks_l4;  logic [7:0] ks_l8;  logic [15:0] ks_l16;
  logic [NCFG-1:0] v, l, w;
  int c[NCFG], f[NCFG], n[NCFG];
  int bits[NCFG], wcyc[NCFG];

  espresso_galois #(.W(1))  g1  (.clk, .rst, .din, .ks(ks_g1),  .ks_valid(v[0]), .load(l[0]), .work(w[0]));
  espresso_galois #(.W(4))  g4  (.clk, .rst, .din, .ks(ks_g4),  .ks_valid(v[1]), .load(l[1]), .work(w[1]));
  espresso_fib    #(.W(1))  f1  (.clk, .rst, .din, .ks(ks_f1),  .ks_valid(v[2]), .load(l[2]), .work(w[2]));
  espresso_fib    #(.W(4))  f4  (.clk, .rst, .din, .ks(ks_f4),  .ks_valid(v[3]), .load(l[3]), .work(w[3]));
  espresso_fib    #(.W(8))  f8  (.clk, .rst, .din, .ks(ks_f8),  .ks_valid(v[4]), .load(l[4]), .work(w[4]));
  espresso_fib    #(.W(16)) f16 (.clk, .rst, .din, .ks(ks_f16), .ks_valid(v[5]), .load(l[5]), .work(w[5]));
  espresso_lfsr   #(.W(1))  l1  (.clk, .rst, .din, .ks(ks_l1),  .ks_valid(v[6]), .load(l[6]), .work(w[6]));
  espresso_lfsr   #(.W(4))  l4  (.clk, .rst, .din, .ks(ks_l4),  .ks_valid(v[7]), .load(l[7]), .work(w[7]));
  espresso_lfsr   #(.W(8))  l8  (.clk, .rst, .din, .ks(ks_l8),  .ks_valid(v[8]), .load(l[8]), .work(w[8]));
  espresso_lfsr   #(.W(16)) l16 (.clk, .rst, .din, .ks(ks_l16), .ks_valid(v[9]), .load(l[9]), .work(w[9]));

  tb_ks_check #(.W(1),  .MODE(0))                    kg1  (.clk, .rst, .key, .iv, .ks(ks_g1),  .ks_valid(v[0]), .load(l[0]), .work(w[0]), .checks(c[0]), .failures(f[0]), .words(n[0]));
  tb_ks_check #(.W(4),  .MODE(0), .SKIP(1), .LAT(513)) kg4 (.clk, .rst, .key, .iv, .ks(ks_g4), .ks_valid(v[1]), .load(l[1]), .work(w[1]), .checks(c[1]), .failures(f[1]), .words(n[1]));
  tb_ks_check #(.W(1),  .MODE(1))                    kf1  (.clk, .rst, .key, .iv, .ks(ks_f1),  .ks_valid(v[2]), .load(l[2]), .work(w[2]), .checks(c[2]), .failures(f[2]), .words(n[2]));
  tb_ks_check #(.W(4),  .MODE(1))                    kf4  (.clk, .rst, .key, .iv, .ks(ks_f4),  .ks_valid(v[3]), .load(l[3]), .work(w[3]), .checks(c[3]), .failures(f[3]), .words(n[3]));
  tb_ks_check #(.W(8),  .MODE(1))                    kf8  (.clk, .rst, .key, .iv, .ks(ks_f8),  .ks_valid(v[4]), .load(l[4]), .work(w[4]), .checks(c[4]), .failures(f[4]), .words(n[4]));
  tb_ks_check #(.W(16), .MODE(1))                    kf16 (.clk, .rst, .key, .iv, .ks(ks_f16), .ks_valid(v[5]), .load(l[5]), .work(w[5]), .checks(c[5]), .failures(f[5]), .words(n[5]));
  tb_ks_check #(.W(1),  .MODE(0), .LAT(513))         kl1  (.clk, .rst, .key, .iv, .ks(ks_l1),  .ks_valid(v[6]), .load(l[6]), .work(w[6]), .checks(c[6]), .failures(f[6]), .words(n[6]));
  tb_ks_check #(.W(4),  .MODE(0), .LAT(513))         kl4  (.clk, .rst, .key, .iv, .ks(ks_l4),  .ks_valid(v[7]), .load(l[7]), .work(w[7]), .checks(c[7]), .failures(f[7]), .words(n[7]));
  tb_ks_check #(.W(8),  .MODE(0), .LAT(513))         kl8  (.clk, .rst, .key, .iv, .ks(ks_l8),  .ks_valid(v[8]), .load(l[8]), .work(w[8]), .checks(c[8]), .failures(f[8]), .words(n[8]));
  tb_ks_check #(.W(16), .MODE(0), .LAT(513))         kl16 (.clk, .rst, .key, .iv, .ks(ks_l16), .ks_valid(v[9]), .load(l[9]), .work(w[9]), .checks(c[9]), .failures(f[9]), .words(n[9]));

  // All generators load in lockstep, so one index serves them all.
  assign din = ref_load_bit(key, iv, li);
  always @(posedge clk) if (rst) li <= 0; else if (l[0]) li <= li + 1;

  // Keystream bits delivered in the first RATE_CYC cycles after each
  // generator's first word.
  always @(posedge clk) begin
    for (int i = 0; i < NCFG; i++) begin
      if (rst) begin
        bits[i] = 0;
        wcyc[i] = 0;
      end else if ((v[i] || wcyc[i] > 0) && wcyc[i] < RATE_CYC) begin
        if (v[i]) bits[i] += CW[i];
        wcyc[i]++;
      end
    end
  end

  function automatic bit all_done();
    foreach (n[i]) if (n[i] < 64 || wcyc[i] < RATE_CYC) return 0;
    return 1;
  endfunction

  function automatic void totals();
    checks = 0; failures = 0;
    foreach (c[i]) begin checks += c[i]; failures += f[i]; end
  endfunction

  int rchecks = 0, rfails = 0;

  initial begin
    for (int r = 0; r < NRUNS; r++) begin
      key = {$urandom, $urandom, $urandom, $urandom};
      iv  = {$urandom, $urandom, $urandom};
      if (r == 0) begin key = '0; iv = '1; end
      rst = 1;
      repeat (3) @(posedge clk);
      rst = 0;
      while (!all_done()) @(posedge clk);
      for (int i = 0; i < NCFG; i++) begin
        rchecks++;
        if (bits[i] != RATE_CYC * CW[i]) begin
          rfails++;
          $display("FAIL configuration %0d: %0d bits in %0d cycles, expected %0d",
                   i, bits[i], RATE_CYC, RATE_CYC * CW[i]);
        end
      end
      @(posedge clk);
    end
    totals();
    $display("TB_RESULT checks=%0d failures=%0d", checks + rchecks, failures + rfails);
    $finish;
  end

  initial begin
    repeat (NRUNS * 1000) @(posedge clk);
    $display("watchdog: simulation did not finish");
    totals();
    $display("TB_RESULT checks=%0d failures=%0d", checks + rchecks, failures + rfails + 1);
    $finish;
  end
endmodule
