// Testbench of srl_fragment: 1-, 3- and 16-bit fragments driven with random
// data and a random clock enable, compared every cycle with a queue model
// of a LEN-bit shift register.
module tb_srl_fragment;
  logic clk = 0;
  always #5 clk = ~clk;
  logic en, d;
  logic [0:0]  q1;
  logic [2:0]  q3;
  logic [15:0] q16;
  int checks = 0, failures = 0;
  bit m16[$], m3[$], m1[$];
  int filled = 0;

  srl_fragment #(.LEN(1))  d1  (.clk, .en, .d, .q(q1));
  srl_fragment #(.LEN(3))  d3  (.clk, .en, .d, .q(q3));
  srl_fragment #(.LEN(16)) d16 (.clk, .en, .d, .q(q16));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    en = 1; d = 0;
    repeat (2000) begin
      @(negedge clk);
      if (filled >= 16) begin
        for (int i = 0; i < 16; i++) check(q16[i] == m16[i], $sformatf("q16[%0d]", i));
        for (int i = 0; i < 3; i++)  check(q3[i] == m3[i],   $sformatf("q3[%0d]", i));
        check(q1[0] == m1[0], "q1");
      end
      en = ($urandom % 4) != 0;
      d  = $urandom;
      if (en) begin
        // model: new bit enters at the top, the oldest bit leaves at 0
        m16.push_back(d); if (m16.size() > 16) void'(m16.pop_front());
        m3.push_back(d);  if (m3.size() > 3)   void'(m3.pop_front());
        m1.push_back(d);  if (m1.size() > 1)   void'(m1.pop_front());
        filled++;
      end
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
