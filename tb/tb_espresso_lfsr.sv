// Testbench of espresso_lfsr: 1-, 4- and 16-bit Espresso-L generators from
// the same key/IV stream, for several random keys, against the serial
// Galois Espresso reference model: Espresso-L must reproduce the Galois
// keystream from z_0. The SET cycle makes the first word arrive 513 cycles
// after the first load cycle (256 load, 1 set, 256 init).
module tb_espresso_lfsr;
  import espresso_ref_pkg::*;

  localparam int NRUNS = 3;

  logic clk = 0, rst = 1;
  bit [127:0] key;
  bit [95:0]  iv;
  int li;
  logic din;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  logic [0:0] ks1; logic [3:0] ks4; logic [15:0] ks16;
  logic [2:0] v, l, w;
  int c[3], f[3], n[3];

  espresso_lfsr #(.W(1))  d1  (.clk, .rst, .din, .ks(ks1),  .ks_valid(v[0]), .load(l[0]), .work(w[0]));
  espresso_lfsr #(.W(4))  d4  (.clk, .rst, .din, .ks(ks4),  .ks_valid(v[1]), .load(l[1]), .work(w[1]));
  espresso_lfsr #(.W(16)) d16 (.clk, .rst, .din, .ks(ks16), .ks_valid(v[2]), .load(l[2]), .work(w[2]));

  tb_ks_check #(.W(1),  .MODE(0), .LAT(513)) k1  (.clk, .rst, .key, .iv, .ks(ks1),  .ks_valid(v[0]), .load(l[0]), .work(w[0]), .checks(c[0]), .failures(f[0]), .words(n[0]));
  tb_ks_check #(.W(4),  .MODE(0), .LAT(513)) k4  (.clk, .rst, .key, .iv, .ks(ks4),  .ks_valid(v[1]), .load(l[1]), .work(w[1]), .checks(c[1]), .failures(f[1]), .words(n[1]));
  tb_ks_check #(.W(16), .MODE(0), .LAT(513)) k16 (.clk, .rst, .key, .iv, .ks(ks16), .ks_valid(v[2]), .load(l[2]), .work(w[2]), .checks(c[2]), .failures(f[2]), .words(n[2]));

  assign din = ref_load_bit(key, iv, li);
  always @(posedge clk) if (rst) li <= 0; else if (l[0]) li <= li + 1;

  function automatic bit all_done();
    foreach (n[i]) if (n[i] < 64) return 0;
    return 1;
  endfunction

  function automatic void totals();
    checks = 0; failures = 0;
    foreach (c[i]) begin checks += c[i]; failures += f[i]; end
  endfunction

  initial begin
    for (int r = 0; r < NRUNS; r++) begin
      key = {$urandom, $urandom, $urandom, $urandom};
      iv  = {$urandom, $urandom, $urandom};
      if (r == 0) begin key = '0; iv = '1; end
      rst = 1;
      repeat (3) @(posedge clk);
      rst = 0;
      while (!all_done()) @(posedge clk);
      @(posedge clk);
    end
    totals();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NRUNS * 1000) @(posedge clk);
    $display("watchdog: simulation did not finish");
    totals();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
