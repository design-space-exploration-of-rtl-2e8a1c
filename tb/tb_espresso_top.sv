// End-to-end testbench of espresso_top at its default widths (Galois 4,
// Espresso-F 16, Espresso-L 16 bits per clock).
//
// Each run resets the design, feeds a random key/IV serially to each
// generator while its load flag is high, and checks every keystream word
// against the serial reference models, with the phase timing. The Galois
// and Espresso-L generators get the same key and IV, and their streams are
// also compared with each other bit by bit. One run is cut short by a
// reset in the middle of initialisation. Mechanisms counted, each of which
// must occur: serial load, the Espresso-L SET cycle, initialisation with
// feedback, multi-bit words of each variant, the empty first WORK cycle of
// the Galois hybrid, Espresso-F words wide enough to chain f_255 on f_217,
// and a restart after a reset during initialisation.
module tb_espresso_top;
  import espresso_ref_pkg::*;

  localparam int NRUNS  = 3;
  localparam int GW = 4, FW = 16, LW = 16;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  bit [127:0] key, fkey;
  bit [95:0]  iv, fiv;
  int gli, fli, lli;
  logic g_din, f_din, l_din;
  logic [GW-1:0] g_ks; logic [FW-1:0] f_ks; logic [LW-1:0] l_ks;
  logic g_v, f_v, l_v, g_load, f_load, l_load, g_work, f_work, l_work;
  int c[3], f[3], n[3];
  int checks = 0, failures = 0;

  espresso_top dut (
    .clk, .rst,
    .g_din, .g_ks, .g_ks_valid(g_v), .g_load, .g_work,
    .f_din, .f_ks, .f_ks_valid(f_v), .f_load, .f_work,
    .l_din, .l_ks, .l_ks_valid(l_v), .l_load, .l_work
  );

  tb_ks_check #(.W(GW), .MODE(0), .SKIP(1), .LAT(513)) kg (.clk, .rst, .key(key),  .iv(iv),  .ks(g_ks), .ks_valid(g_v), .load(g_load), .work(g_work), .checks(c[0]), .failures(f[0]), .words(n[0]));
  tb_ks_check #(.W(FW), .MODE(1), .SKIP(0), .LAT(512)) kf (.clk, .rst, .key(fkey), .iv(fiv), .ks(f_ks), .ks_valid(f_v), .load(f_load), .work(f_work), .checks(c[1]), .failures(f[1]), .words(n[1]));
  tb_ks_check #(.W(LW), .MODE(0), .SKIP(0), .LAT(513)) kl (.clk, .rst, .key(key),  .iv(iv),  .ks(l_ks), .ks_valid(l_v), .load(l_load), .work(l_work), .checks(c[2]), .failures(f[2]), .words(n[2]));

  assign g_din = ref_load_bit(key,  iv,  gli);
  assign f_din = ref_load_bit(fkey, fiv, fli);
  assign l_din = ref_load_bit(key,  iv,  lli);
  always @(posedge clk)
    if (rst) begin gli <= 0; fli <= 0; lli <= 0; end
    else begin
      if (g_load) gli <= gli + 1;
      if (f_load) fli <= fli + 1;
      if (l_load) lli <= lli + 1;
    end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Mechanism counters and the Galois / Espresso-L cross-check.
  int m_load, m_set, m_init, m_gword, m_fword, m_lword, m_gskip, m_chain, m_restart;
  int cyc, g_load_end, l_load_end, g_work_start, l_work_start;
  bit gq[$], lq[$];
  logic g_load_d, l_load_d, g_work_d, l_work_d;

  always @(posedge clk) begin
    if (rst) begin
      cyc = 0; g_load_end = -1; l_load_end = -1; g_work_start = -1; l_work_start = -1;
      gq.delete(); lq.delete();
      g_load_d = 0; l_load_d = 0; g_work_d = 0; l_work_d = 0;
    end else begin
      if (g_load_d && !g_load) begin g_load_end = cyc; m_load++; end
      if (l_load_d && !l_load) l_load_end = cyc;
      if (g_work && !g_work_d) begin g_work_start = cyc; m_init++; end
      if (l_work && !l_work_d) begin
        l_work_start = cyc;
        // INIT lasts 256 cycles in both; Espresso-L spends one more in SET
        check(l_work_start - l_load_end == g_work_start - g_load_end + 1,
              "Espresso-L SET cycle between LOAD and INIT");
        if (l_work_start - l_load_end == 257) m_set++;
      end
      if (g_work && !g_v) m_gskip++;
      if (g_v) begin m_gword++; for (int j = 0; j < GW; j++) gq.push_back(g_ks[j]); end
      if (f_v) begin m_fword++; if (FW >= 6) m_chain++; end
      if (l_v) begin m_lword++; for (int j = 0; j < LW; j++) lq.push_back(l_ks[j]); end
      // Galois stream starts at z_1, Espresso-L at z_0
      while (gq.size() > 0 && lq.size() > 1) begin
        check(gq.pop_front() == lq[1], "Galois and Espresso-L keystreams agree");
        void'(lq.pop_front());
      end
      g_load_d = g_load; l_load_d = l_load; g_work_d = g_work; l_work_d = l_work;
      cyc++;
    end
  end

  function automatic bit all_done();
    foreach (n[i]) if (n[i] < 64) return 0;
    return 1;
  endfunction

  initial begin
    {m_load, m_set, m_init, m_gword, m_fword, m_lword, m_gskip, m_chain, m_restart} = '0;
    for (int r = 0; r < NRUNS; r++) begin
      key  = {$urandom, $urandom, $urandom, $urandom};
      iv   = {$urandom, $urandom, $urandom};
      fkey = {$urandom, $urandom, $urandom, $urandom};
      fiv  = {$urandom, $urandom, $urandom};
      rst = 1;
      repeat (3) @(posedge clk);
      rst = 0;
      if (r == 1) begin
        // abandon this run in the middle of initialisation
        repeat (400) @(posedge clk);
        rst = 1;
        repeat (2) @(posedge clk);
        rst = 0;
        m_restart++;
      end
      while (!all_done()) @(posedge clk);
      @(posedge clk);
    end
    check(m_load    > 0, "serial load happened");
    check(m_set     > 0, "Espresso-L SET happened");
    check(m_init    > 0, "initialisation completed");
    check(m_gword   > 0, "Galois hybrid words");
    check(m_fword   > 0, "Espresso-F words");
    check(m_lword   > 0, "Espresso-L words");
    check(m_gskip   > 0, "Galois empty first WORK cycle");
    check(m_chain   > 0, "Espresso-F chained feedback words");
    check(m_restart > 0, "restart after reset in INIT");
    $display("mechanisms: load=%0d set=%0d init=%0d gwords=%0d fwords=%0d lwords=%0d gskip=%0d chain=%0d restart=%0d",
             m_load, m_set, m_init, m_gword, m_fword, m_lword, m_gskip, m_chain, m_restart);
    foreach (c[i]) begin checks += c[i]; failures += f[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NRUNS * 1000 + 1000) @(posedge clk);
    $display("watchdog: simulation did not finish");
    foreach (c[i]) begin checks += c[i]; failures += f[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
