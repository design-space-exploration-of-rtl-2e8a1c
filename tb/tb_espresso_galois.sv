// Testbench of espresso_galois: serial (with and without SRL fragments),
// 2-bit and 4-bit hybrid generators run side by side from the same key/IV
// stream, for several random keys, against the serial reference model.
// Serial: first bit z_0 in the first WORK cycle, 512 cycles after the first
// load cycle. Hybrid: words z_1.. from the second WORK cycle (513 cycles).
module tb_espresso_galois;
  import espresso_ref_pkg::*;

  localparam int NRUNS = 3;

  logic clk = 0, rst = 1;
  bit [127:0] key;
  bit [95:0]  iv;
  int li;
  logic din;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  logic [0:0] ks1, ks1n;  logic [1:0] ks2;  logic [3:0] ks4;
  logic v1, v1n, v2, v4, l1, l1n, l2, l4, w1, w1n, w2, w4;
  int c[4], f[4], n[4];

  espresso_galois #(.W(1))                 d1  (.clk, .rst, .din, .ks(ks1),  .ks_valid(v1),  .load(l1),  .work(w1));
  espresso_galois #(.W(1), .USE_SRL(1'b0)) d1n (.clk, .rst, .din, .ks(ks1n), .ks_valid(v1n), .load(l1n), .work(w1n));
  espresso_galois #(.W(2))                 d2  (.clk, .rst, .din, .ks(ks2),  .ks_valid(v2),  .load(l2),  .work(w2));
  espresso_galois #(.W(4))                 d4  (.clk, .rst, .din, .ks(ks4),  .ks_valid(v4),  .load(l4),  .work(w4));

  tb_ks_check #(.W(1), .MODE(0), .SKIP(0), .LAT(512)) k1  (.clk, .rst, .key, .iv, .ks(ks1),  .ks_valid(v1),  .load(l1),  .work(w1),  .checks(c[0]), .failures(f[0]), .words(n[0]));
  tb_ks_check #(.W(1), .MODE(0), .SKIP(0), .LAT(512)) k1n (.clk, .rst, .key, .iv, .ks(ks1n), .ks_valid(v1n), .load(l1n), .work(w1n), .checks(c[1]), .failures(f[1]), .words(n[1]));
  tb_ks_check #(.W(2), .MODE(0), .SKIP(1), .LAT(513)) k2  (.clk, .rst, .key, .iv, .ks(ks2),  .ks_valid(v2),  .load(l2),  .work(w2),  .checks(c[2]), .failures(f[2]), .words(n[2]));
  tb_ks_check #(.W(4), .MODE(0), .SKIP(1), .LAT(513)) k4  (.clk, .rst, .key, .iv, .ks(ks4),  .ks_valid(v4),  .load(l4),  .work(w4),  .checks(c[3]), .failures(f[3]), .words(n[3]));

  // serial key / IV source
  assign din = ref_load_bit(key, iv, li);
  always @(posedge clk) if (rst) li <= 0; else if (l1) li <= li + 1;

  initial begin
    for (int r = 0; r < NRUNS; r++) begin
      key = {$urandom, $urandom, $urandom, $urandom};
      iv  = {$urandom, $urandom, $urandom};
      if (r == 0) begin key = '0; iv = '0; end
      rst = 1;
      repeat (3) @(posedge clk);
      rst = 0;
      wait (n[0] >= 64 && n[1] >= 64 && n[2] >= 64 && n[3] >= 64);
      @(posedge clk);
    end
    checks = c[0] + c[1] + c[2] + c[3];
    failures = f[0] + f[1] + f[2] + f[3];
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NRUNS * 1000) @(posedge clk);
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1] + c[2] + c[3], f[0] + f[1] + f[2] + f[3] + 1);
    $finish;
  end
endmodule
