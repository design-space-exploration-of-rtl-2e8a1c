// Testbench of espresso_filter: the all-zero and single-term cases worked
// out by hand, then random states compared with the reference h.
module tb_espresso_filter;
  import espresso_ref_pkg::*;

  logic [255:0] x;
  logic z;
  int checks = 0, failures = 0;

  espresso_filter dut (.x(x), .z(z));

  task automatic check(bit exp, string what);
    #1;
    checks++;
    if (z !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: z=%b expected %b", what, z, exp);
    end
  endtask

  initial begin
    x = '0;            check(1'b0, "all zero");
    x = '0; x[80] = 1; check(1'b1, "x80 alone");
    x = '0; x[227] = 1; x[222] = 1; check(1'b0, "x227^x222");
    x = '0; x[243] = 1; check(1'b0, "x243 without x217");
    x = '0; x[243] = 1; x[217] = 1; check(1'b1, "x243 x217");
    x = '0; x[164] = 1; x[29] = 1; check(1'b1, "x164 x29");
    // six-variable product together with the pairs it overlaps:
    // x255x251=0, x247x231=0, x213x235=0, x243x217=0, x181x239=0, x174x44=0
    x = '0; foreach (x[i]) if (i inside {255, 247, 243, 213, 181, 174}) x[i] = 1;
    check(1'b1, "six-variable product");
    x = '1; check(1'b0, "all ones"); // 6 linear + 7 pairs + product = 14 ones
    repeat (4000) begin
      for (int k = 0; k < 8; k++) x[k*32 +: 32] = $urandom;
      check(ref_h(x), "random state");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
