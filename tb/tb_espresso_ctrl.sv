// Testbench of espresso_ctrl, with and without the SET state.
// Checks the phase lengths (1 IDLE, 256 LOAD, 1 SET if present, 256 INIT),
// the counter value on entering INIT (256 / 257) and WORK (0 / 1), that
// load and work follow LOAD and WORK, that WORK is kept, and that a reset
// in the middle of INIT returns to IDLE and restarts the sequence.
module tb_espresso_ctrl;
  import espresso_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  fsm_t s0, s1;
  logic [8:0] c0, c1;
  logic ld0, ld1, wk0, wk1;

  espresso_ctrl #(.HAS_SET(1'b0)) d0 (.clk, .rst, .state(s0), .cnt(c0), .load(ld0), .work(wk0));
  espresso_ctrl #(.HAS_SET(1'b1)) d1 (.clk, .rst, .state(s1), .cnt(c1), .load(ld1), .work(wk1));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Lengths of the phases, counted per controller.
  int n_idle[2], n_load[2], n_set[2], n_init[2], n_work[2];
  fsm_t prev[2];

  always @(posedge clk) begin
    if (rst) begin
      foreach (n_idle[i]) begin
        n_idle[i] = 0; n_load[i] = 0; n_set[i] = 0; n_init[i] = 0; n_work[i] = 0;
      end
      prev[0] = ST_IDLE; prev[1] = ST_IDLE;
    end else begin
      for (int i = 0; i < 2; i++) begin
        fsm_t s;
        logic [8:0] c;
        logic ld, wk;
        s  = (i == 0) ? s0 : s1;
        c  = (i == 0) ? c0 : c1;
        ld = (i == 0) ? ld0 : ld1;
        wk = (i == 0) ? wk0 : wk1;
        check(ld == (s == ST_LOAD), "load follows LOAD");
        check(wk == (s == ST_WORK), "work follows WORK");
        if (s == ST_INIT && prev[i] != ST_INIT)
          check(c == ((i == 0) ? 9'd256 : 9'd257), $sformatf("cnt on entering INIT (%0d)", c));
        if (s == ST_WORK && prev[i] != ST_WORK)
          check(c == ((i == 0) ? 9'd0 : 9'd1), $sformatf("cnt on entering WORK (%0d)", c));
        if (prev[i] == ST_WORK) check(s == ST_WORK, "WORK kept");
        case (s)
          ST_IDLE: n_idle[i]++;
          ST_LOAD: n_load[i]++;
          ST_SET:  n_set[i]++;
          ST_INIT: n_init[i]++;
          ST_WORK: n_work[i]++;
          default: ;
        endcase
        prev[i] = s;
      end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst = 0;
    repeat (600) @(posedge clk);
    for (int i = 0; i < 2; i++) begin
      check(n_idle[i] == 1,   $sformatf("IDLE lasted %0d", n_idle[i]));
      check(n_load[i] == 256, $sformatf("LOAD lasted %0d", n_load[i]));
      check(n_set[i] == i,    $sformatf("SET lasted %0d", n_set[i]));
      check(n_init[i] == 256, $sformatf("INIT lasted %0d", n_init[i]));
      check(n_work[i] == 600 - 513 - i, $sformatf("WORK lasted %0d", n_work[i]));
    end
    // reset in the middle of INIT
    rst = 1; @(posedge clk); rst = 0;
    repeat (400) @(posedge clk);
    rst = 1; @(posedge clk); #1;
    check(s0 == ST_IDLE && s1 == ST_IDLE, "reset returns to IDLE");
    rst = 0;
    repeat (600) @(posedge clk);
    for (int i = 0; i < 2; i++) begin
      check(n_load[i] == 256 && n_init[i] == 256, "sequence after second reset");
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
