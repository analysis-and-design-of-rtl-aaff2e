// tb_ssa_pid_compensator: self-checking test of the whole compensator.
// Strobes follow the DPWM pattern (Clk1 every 4th Clk4), here with a short
// 32-clock period. The ADC codes follow a random walk with sudden jumps
// around the reference, so that both channels visit all four states and the
// duty command reaches both of its limits. The reference model
// (ssa_ref_pkg::ssa_model) predicts dn; the check is made exactly two clocks
// after each strobe, and dn must not change one clock after a strobe.
module tb_ssa_pid_compensator;
  import ssa_pid_pkg::*;
  import ssa_ref_pkg::*;
  logic clk = 0, n_rst = 0, clk1_en = 0, clk4_en = 0;
  logic [7:0] vo1 = 0, vo4 = 0, vref = 8'd180;
  logic [9:0] dn;
  adapt_state_e state1, state4;
  int checks = 0, failures = 0;
  int seen1[4] = '{0, 0, 0, 0};
  int seen4[4] = '{0, 0, 0, 0};
  int n_max = 0, n_min = 0;

  ssa_pid_compensator dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0d exp %0d at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    ssa_model m;
    int v, step, prev_dn, dl[2];
    m = new(KP_DEF, KI_DEF, KD_DEF, DKP_DEF, DKP1_DEF, DKI_DEF, DKI1_DEF, DKD_DEF,
            VTHR1_DEF, VTHR4_DEF);
    v = 180;
    dl = '{0, 0};
    repeat (3) @(negedge clk);
    n_rst = 1;
    for (int t = 0; t < 40000; t++) begin
      @(negedge clk);
      // dn seen now must be the model's value from two strobe-cycles back
      chk(dn, dl[1], "dn");
      if (dn == 1023) n_max++;
      if (dn == 0) n_min++;
      dl[1] = dl[0];
      clk4_en = (t % 8) == 0;
      clk1_en = (t % 32) == 0;
      // plant-like input: random walk with occasional jumps
      if (clk4_en) begin
        step = int'($urandom % 7) - 3;
        if ($urandom % 40 == 0) step = int'($urandom % 81) - 40;
        if ((t / 8000) % 2 == 1) step += (v < 180) ? 1 : -1;
        v += step;
        if (v < 0) v = 0;
        if (v > 255) v = 255;
      end
      vo4 = 8'(v);
      vo1 = 8'(v);
      if (clk1_en) m.sample1(v, 180);
      if (clk4_en) m.sample4(v, 180);
      if (clk1_en) seen1[m.st1]++;
      if (clk4_en) seen4[m.st4]++;
      dl[0] = m.dn();
      // one clock after a strobe dn must still show the old value
      prev_dn = dl[1];
      @(posedge clk);
      @(negedge clk);
      chk(dn, prev_dn, "dn latency");
      dl[1] = dl[0];
      clk1_en = 0; clk4_en = 0;
      t++;
    end
    for (int s = 0; s < 4; s++) begin
      checks += 2;
      if (seen1[s] == 0 || seen4[s] == 0) begin
        failures++;
        $display("FAIL state %0d not covered (%0d, %0d)", s, seen1[s], seen4[s]);
      end
    end
    checks++;
    if (n_max == 0 || n_min == 0) begin
      failures++;
      $display("FAIL duty limits not reached: max %0d min %0d", n_max, n_min);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
