// Keystream checker used by the generator testbenches.
//
// Watches one generator. While rst is high it computes the reference
// keystream for key/iv with the serial reference model (MODE 0: Galois
// Espresso, also the stream of Espresso-L; MODE 1: Espresso-F). After
// reset it checks, per run:
//   * load is high for exactly 256 consecutive cycles;
//   * ks_valid first rises LAT cycles after the first load cycle, and only
//     together with work;
//   * each valid word equals reference bits z_(SKIP+W*n) .. z_(SKIP+W*n+W-1)
//     with ks[0] the first of them; ks is zero while ks_valid is low;
//   * once the first word has come, ks_valid stays high in every work
//     cycle, so the generator delivers W bits per clock.
// It counts checks, failures and checked words.
module tb_ks_check
  import espresso_ref_pkg::*;
#(
  parameter int W      = 1,
  parameter int MODE   = 0,
  parameter int SKIP   = 0,
  parameter int LAT    = 512,
  parameter int NWORDS = 64
) (
  input  logic         clk,
  input  logic         rst,
  input  bit   [127:0] key,
  input  bit   [95:0]  iv,
  input  logic [W-1:0] ks,
  input  logic         ks_valid,
  input  logic         load,
  input  logic         work,
  output int           checks,
  output int           failures,
  output int           words
);
  bit z[$];
  int cyc, first_load, nload, idx;
  bit seen_valid, load_checked;

  initial begin
    checks = 0;
    failures = 0;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL [W=%0d MODE=%0d] %s at cycle %0d", W, MODE, what, cyc);
    end
  endtask

  always @(posedge clk) begin
    if (rst) begin
      if (MODE == 0) ref_galois_ks(key, iv, SKIP + W * NWORDS, z);
      else           ref_fib_ks(key, iv, SKIP + W * NWORDS, z);
      cyc = 0; first_load = -1; nload = 0; idx = SKIP; words = 0;
      seen_valid = 0; load_checked = 0;
    end else begin
      if (load) begin
        if (first_load < 0) first_load = cyc;
        nload++;
      end else if (nload > 0 && !load_checked) begin
        load_checked = 1;
        check(nload == 256, $sformatf("load lasted %0d cycles", nload));
      end
      if (ks_valid) begin
        check(work, "ks_valid outside work");
        if (!seen_valid) begin
          seen_valid = 1;
          check(cyc - first_load == LAT,
                $sformatf("first word %0d cycles after load start, expected %0d",
                          cyc - first_load, LAT));
        end
        if (words < NWORDS) begin
          for (int j = 0; j < W; j++)
            check(ks[j] == z[idx + j], $sformatf("word %0d bit %0d", words, j));
          idx += W;
          words++;
        end
      end else begin
        check(ks == '0, "ks not zero while invalid");
        if (seen_valid && work) check(1'b0, "gap in the keystream");
      end
      cyc++;
    end
  end
endmodule
