// Testbench of espresso_fib: serial (with and without SRL fragments) and
// 5-, 6-, 8- and 16-bit generators run side by side from the same key/IV
// stream, for several random keys, against the serial Espresso-F reference
// model. Widths from 6 up use the chained feedback (f_255^j reading the
// f_217 output of the same cycle). All widths deliver z_0 first, in the
// first WORK cycle, 512 cycles after the first load cycle.
module tb_espresso_fib;
  import espresso_ref_pkg::*;

  localparam int NRUNS = 3;

  logic clk = 0, rst = 1;
  bit [127:0] key;
  bit [95:0]  iv;
  int li;
  logic din;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  logic [0:0] ks1, ks1n; logic [4:0] ks5; logic [5:0] ks6; logic [7:0] ks8; logic [15:0] ks16;
  logic [5:0] v, l, w;
  int c[6], f[6], n[6];

  espresso_fib #(.W(1))                 d1  (.clk, .rst, .din, .ks(ks1),  .ks_valid(v[0]), .load(l[0]), .work(w[0]));
  espresso_fib #(.W(1), .USE_SRL(1'b0)) d1n (.clk, .rst, .din, .ks(ks1n), .ks_valid(v[1]), .load(l[1]), .work(w[1]));
  espresso_fib #(.W(5))                 d5  (.clk, .rst, .din, .ks(ks5),  .ks_valid(v[2]), .load(l[2]), .work(w[2]));
  espresso_fib #(.W(6))                 d6  (.clk, .rst, .din, .ks(ks6),  .ks_valid(v[3]), .load(l[3]), .work(w[3]));
  espresso_fib #(.W(8))                 d8  (.clk, .rst, .din, .ks(ks8),  .ks_valid(v[4]), .load(l[4]), .work(w[4]));
  espresso_fib #(.W(16))                d16 (.clk, .rst, .din, .ks(ks16), .ks_valid(v[5]), .load(l[5]), .work(w[5]));

  tb_ks_check #(.W(1),  .MODE(1)) k1  (.clk, .rst, .key, .iv, .ks(ks1),  .ks_valid(v[0]), .load(l[0]), .work(w[0]), .checks(c[0]), .failures(f[0]), .words(n[0]));
  tb_ks_check #(.W(1),  .MODE(1)) k1n (.clk, .rst, .key, .iv, .ks(ks1n), .ks_valid(v[1]), .load(l[1]), .work(w[1]), .checks(c[1]), .failures(f[1]), .words(n[1]));
  tb_ks_check #(.W(5),  .MODE(1)) k5  (.clk, .rst, .key, .iv, .ks(ks5),  .ks_valid(v[2]), .load(l[2]), .work(w[2]), .checks(c[2]), .failures(f[2]), .words(n[2]));
  tb_ks_check #(.W(6),  .MODE(1)) k6  (.clk, .rst, .key, .iv, .ks(ks6),  .ks_valid(v[3]), .load(l[3]), .work(w[3]), .checks(c[3]), .failures(f[3]), .words(n[3]));
  tb_ks_check #(.W(8),  .MODE(1)) k8  (.clk, .rst, .key, .iv, .ks(ks8),  .ks_valid(v[4]), .load(l[4]), .work(w[4]), .checks(c[4]), .failures(f[4]), .words(n[4]));
  tb_ks_check #(.W(16), .MODE(1)) k16 (.clk, .rst, .key, .iv, .ks(ks16), .ks_valid(v[5]), .load(l[5]), .work(w[5]), .checks(c[5]), .failures(f[5]), .words(n[5]));

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
      if (r == 0) begin key = '1; iv = '1; end
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
