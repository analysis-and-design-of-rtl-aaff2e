// tb_dpwm: self-checking test of dpwm at the default 10-bit resolution.
// Checks the period (1024 clocks), the pulse width (duty clocks, including 0
// and the maximum), the complementary output, the Clk1 strobe once per period
// and the Clk4 strobe four times per period at quarter-period spacing, and
// the one-pulse rule: raising the duty above the counter after the pulse has
// ended must not start a second pulse, while lowering it mid-pulse ends the
// pulse at once.
module tb_dpwm;
  logic clk = 0, n_rst = 0;
  logic [9:0] duty = 0;
  logic pwm_a, pwm_a_n, clk1_en, clk4_en;
  logic [9:0] cnt;
  int checks = 0, failures = 0;

  dpwm dut (.*);

  always #1 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  // measure one period that starts at the next Clk1 strobe
  task automatic period(output int high, output int n1, output int n4,
                        output int rises, output int len, output int comp_err,
                        input int change_at, input int new_duty);
    int k, last, q4;
    logic prev;
    high = 0; n1 = 0; n4 = 0; rises = 0; comp_err = 0; last = -1; q4 = 0;
    while (!clk1_en) @(negedge clk);
    prev = 0;
    for (k = 0; k < 1024; k++) begin
      if (k == change_at) duty = 10'(new_duty);
      if (clk1_en) n1++;
      if (clk4_en) begin
        n4++;
        if (last >= 0 && k - last != 256) q4++;
        last = k;
      end
      @(negedge clk);
      if (pwm_a) high++;
      if (pwm_a && !prev) rises++;
      if (pwm_a == pwm_a_n) comp_err++;
      prev = pwm_a;
    end
    len = k;
    comp_err += q4;
  endtask

  initial begin
    int high, n1, n4, rises, len, ce;
    int duties[6] = '{0, 1, 368, 512, 1000, 1023};
    repeat (3) @(negedge clk);
    n_rst = 1;
    foreach (duties[j]) begin
      duty = 10'(duties[j]);
      period(high, n1, n4, rises, len, ce, -1, 0);   // settle
      period(high, n1, n4, rises, len, ce, -1, 0);
      chk(high, duties[j], "pulse width");
      chk(n1, 1, "Clk1 strobes per period");
      chk(n4, 4, "Clk4 strobes per period");
      chk(ce, 0, "complement/quarter spacing");
      chk(rises, duties[j] == 0 ? 0 : 1, "pulses per period");
    end
    // raise duty after the pulse ended: no second pulse
    duty = 100;
    period(high, n1, n4, rises, len, ce, -1, 0);
    period(high, n1, n4, rises, len, ce, 300, 700);
    chk(high, 100, "no re-trigger width");
    chk(rises, 1, "no re-trigger pulses");
    // lower duty mid-pulse: pulse ends early (change at count 256 to 200)
    duty = 600;
    period(high, n1, n4, rises, len, ce, -1, 0);
    period(high, n1, n4, rises, len, ce, 256, 200);
    chk(high, 256, "early cut width");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
