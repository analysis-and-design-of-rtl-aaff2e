// tb_ssa_pid_top: closed-loop test of the SSA-PID buck controller at its
// default size (10-bit DPWM, 1024 clocks per 1 MHz switching period).
//
// The controller drives a behavioural buck stage (5 V in, 1.8 V out,
// 4.7 uH / 10 uF) through 8-bit converters with a 10 mV LSB. The run covers
//   start-up from 0 V into a 0.3 A load,
//   a 0.7 A load step up and back down,
//   a 1 V input step down (5 V -> 4 V) and back up,
//   a 0.5 A load step up and back down,
//   a reference step to 1.5 V and back (the only disturbance here that flips
//   the sign of a large P-channel error between two quarter-period samples).
// Checks:
//   * every clock, dn equals the reference control law (ssa_ref_pkg) fed
//     with the same ADC codes at the same strobes, two clocks later;
//   * the output settles within +-60 mV of 1.8 V before each disturbance;
//   * start-up overshoot stays below 60 mV and load-step deviation below
//     300 mV;
//   * mechanisms: each of the four states in both channels, duty updates in
//     the middle of a switching period (oversampled P channel), and the duty
//     command at its upper limit must each happen at least once.
// Recovery times and peak deviations are printed for each disturbance.
module tb_ssa_pid_top;
  import ssa_pid_pkg::*;
  import ssa_ref_pkg::*;
  timeunit 1ns;
  timeprecision 1ps;

  logic clk = 0, n_rst = 0;
  logic [7:0] adc1_data, adc2_data;
  logic [7:0] vref = 8'd180;
  logic pwm_a, pwm_a_n, adc1_sample, adc2_sample;
  logic [9:0] dn, pwm_count;
  adapt_state_e state1, state4;
  real vin = 5.0, r_load = 6.0, i_step = 0.0, vout, il;

  int checks = 0, failures = 0;
  int seen1[4] = '{0, 0, 0, 0};
  int seen4[4] = '{0, 0, 0, 0};
  int mid_updates = 0, at_max = 0;
  longint cyc = 0;

  ssa_pid_top dut (.*);
  buck_model u_buck (.clk, .a(pwm_a), .a_n(pwm_a_n), .vin, .r_load, .i_step, .vout, .il);
  adc_model #(.BITS(8), .LSB(0.01)) u_adc1 (.v(vout), .code(adc1_data));
  adc_model #(.BITS(8), .LSB(0.01)) u_adc2 (.v(vout), .code(adc2_data));

  always #0.488 clk = ~clk;

  localparam longint US = 1025;  // clocks per microsecond (0.976 ns clock)

  initial begin
    #4000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0.1f us", what, real'(cyc) / real'(US));
    end
  endtask

  // --- reference model, two clocks behind -------------------------------
  ssa_model m;
  int dl[2] = '{0, 0};
  int last_dn = 0;
  int dn_mismatch = 0;

  always @(negedge clk) begin
    if (n_rst) begin
      cyc++;
      if (dn != dl[1]) dn_mismatch++;
      if (dn == 10'h3ff) at_max++;
      dl[1] = dl[0];
      if (adc1_sample) begin m.sample1(adc1_data, vref); seen1[m.st1]++; end
      if (adc2_sample) begin m.sample4(adc2_data, vref); seen4[m.st4]++; end
      dl[0] = m.dn();
      last_dn = dn;
    end
  end

  // duty changes that do not come from a period-start (Clk1) sample
  always @(negedge clk) begin
    if (n_rst && (pwm_count == 10'd258 || pwm_count == 10'd514 || pwm_count == 10'd770)) begin
      if (dn != prev_q) mid_updates++;
    end
  end
  logic [9:0] prev_q;
  always @(negedge clk) if (pwm_count == 10'd255 || pwm_count == 10'd511 || pwm_count == 10'd767) prev_q <= dn;

  // --- measurement helpers ----------------------------------------------
  real vmax, vmin;
  longint last_out;   // last clock at which |vout - 1.8| > 30 mV

  task automatic run_us(longint us);
    repeat (us * US) begin
      @(negedge clk);
      if (vout > vmax) vmax = vout;
      if (vout < vmin) vmin = vout;
      if (vout > 1.83 || vout < 1.77) last_out = cyc;
    end
  endtask

  task automatic settled(string what, real target = 1.8);
    real lo, hi;
    lo = 10.0; hi = -10.0;
    repeat (20 * US) begin
      @(negedge clk);
      if (vout > hi) hi = vout;
      if (vout < lo) lo = vout;
    end
    $display("%s: vout in [%0.3f, %0.3f] V", what, lo, hi);
    chk(hi < target + 0.06 && lo > target - 0.06, {what, ": regulation within 60 mV"});
  endtask

  task automatic disturb(string what, longint start, longint len_us, real lim);
    real dev;
    vmax = 0.0; vmin = 10.0; last_out = start;
    run_us(len_us);
    dev = (vmax - 1.8 > 1.8 - vmin) ? vmax - 1.8 : 1.8 - vmin;
    $display("%s: peak deviation %0.0f mV, recovery to +-30 mV after %0.1f us",
             what, dev * 1000.0, real'(last_out - start) / real'(US));
    chk(dev < lim, {what, ": deviation bound"});
  endtask

  initial begin
    m = new(KP_DEF, KI_DEF, KD_DEF, DKP_DEF, DKP1_DEF, DKI_DEF, DKI1_DEF, DKD_DEF,
            VTHR1_DEF, VTHR4_DEF);
    repeat (5) @(negedge clk);
    n_rst = 1;
    // start-up
    vmax = 0.0; vmin = 10.0;
    run_us(150);
    $display("start-up: maximum vout %0.3f V", vmax);
    chk(vmax < 1.86, "start-up overshoot below 60 mV");
    settled("after start-up");
    // load step 0.3 A -> 1.0 A -> 0.3 A
    i_step = 0.7;
    disturb("load step up 0.7 A", cyc, 130, 0.30);
    settled("after load step up");
    i_step = 0.0;
    disturb("load step down 0.7 A", cyc, 130, 0.30);
    settled("after load step down");
    // line step 5 V -> 4 V -> 5 V
    vin = 4.0;
    disturb("line step down 1 V", cyc, 130, 0.30);
    settled("after line step down");
    vin = 5.0;
    disturb("line step up 1 V", cyc, 130, 0.30);
    settled("after line step up");
    // reference step 1.8 V -> 1.5 V -> 1.8 V: the error changes sign at once
    vref = 8'd150;
    run_us(150);
    settled("after reference step to 1.5 V", 1.5);
    vref = 8'd180;
    run_us(150);
    settled("after reference step back to 1.8 V");
    // smaller load step, 0.5 A up and down
    i_step = 0.5;
    disturb("load step up 0.5 A", cyc, 130, 0.30);
    settled("after 0.5 A step up");
    i_step = 0.0;
    disturb("load step down 0.5 A", cyc, 130, 0.30);
    settled("after 0.5 A step down");

    checks++;
    if (dn_mismatch != 0) begin
      failures++;
      $display("FAIL dn differed from the reference law in %0d clocks", dn_mismatch);
    end
    for (int s = 0; s < 4; s++) begin
      $display("state %0d: ID channel %0d times, P channel %0d times", s, seen1[s], seen4[s]);
      checks += 2;
      if (seen1[s] == 0 || seen4[s] == 0) begin
        failures++;
        $display("FAIL state %0d never happened", s);
      end
    end
    $display("mid-period duty updates %0d, clocks at maximum duty %0d", mid_updates, at_max);
    chk(mid_updates > 0, "mid-period (P channel) duty update happened");
    chk(at_max > 0, "duty command saturated at its maximum");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
