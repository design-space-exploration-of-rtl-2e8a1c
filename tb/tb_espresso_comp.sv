// Testbench of espresso_comp, the Espresso-L compensation network.
// For random LFSR states x it checks that
//   * bits 0..193 pass through unchanged;
//   * the compensated state follows the Galois register: one Galois round
//     applied to comp(x) equals comp of one LFSR round applied to x, with
//     and without the initialisation feedback bit;
//   * a hand-worked case: only x[3] and x[32] set gives C[218] = x3 x32
//     (term of f_217 moved by 0), so x_hat[218] = 1.
module tb_espresso_comp;
  import espresso_ref_pkg::*;

  logic [255:0] x, xn, xh, xnh;
  bit fb;
  int checks = 0, failures = 0;

  espresso_comp dut  (.x(x),  .x_hat(xh));
  espresso_comp dutn (.x(xn), .x_hat(xnh));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    x = '0; x[3] = 1; x[32] = 1; xn = x; #1;
    check(xh[218] == 1'b1, "x3 x32 compensates bit 218");
    check(xh[217] == 1'b0, "bit 217 not compensated by f_217");
    repeat (2000) begin
      for (int k = 0; k < 8; k++) x[k*32 +: 32] = $urandom;
      fb = $urandom;
      xn = ref_lfsr_round(x, fb);
      #1;
      check(xh[193:0] == x[193:0], "low bits unchanged");
      check(ref_galois_round(xh, fb) == st_t'(xnh), "Galois round of compensated state");
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
