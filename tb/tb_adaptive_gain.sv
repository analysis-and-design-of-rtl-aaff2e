// tb_adaptive_gain: self-checking test of adaptive_gain.
// Three instances cover a proportional/integral-style gain with falling-edge
// scaling, a derivative-style gain without it, and a negative adjustment that
// must clamp at zero. Random states, errors and peaks are compared with
// ssa_ref_pkg::gain_ref.
module tb_adaptive_gain;
  import ssa_pid_pkg::*;
  import ssa_ref_pkg::*;
  adapt_state_e state;
  logic [7:0] e_n, peak;
  logic [9:0] g_a, g_b, g_c;
  int checks = 0, failures = 0;
  logic clk = 0;

  adaptive_gain #(.MAG_W(8), .GAIN_W(10), .K(40), .DK(100), .DK1(-60), .SCALE_FALL(1'b1))
    u_a (.state, .e_n, .peak, .gain(g_a));
  adaptive_gain #(.MAG_W(8), .GAIN_W(10), .K(128), .DK(64), .DK1(64), .SCALE_FALL(1'b0))
    u_b (.state, .e_n, .peak, .gain(g_b));
  adaptive_gain #(.MAG_W(8), .GAIN_W(10), .K(10), .DK(-30), .DK1(900), .SCALE_FALL(1'b1))
    u_c (.state, .e_n, .peak, .gain(g_c));

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0d exp %0d (st %0d e %0d pk %0d)", what, got, exp,
                                  state, e_n, peak);
    end
  endtask

  initial begin
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      state = adapt_state_e'($urandom % 4);
      e_n   = 8'($urandom);
      peak  = ($urandom % 8 == 0) ? 8'd0 : 8'($urandom);
      #1;
      chk(g_a, gain_ref(40, 100, -60, 1'b1, int'(state), e_n, peak, 1023), "g_a");
      chk(g_b, gain_ref(128, 64, 64, 1'b0, int'(state), e_n, peak, 1023), "g_b");
      chk(g_c, gain_ref(10, -30, 900, 1'b1, int'(state), e_n, peak, 1023), "g_c");
    end
    // a hand-worked case: falling, e = 30, peak = 120, DK = 100 -> 40 + 25 = 65
    state = ST_FALLING; e_n = 30; peak = 120; #1;
    chk(g_a, 65, "g_a worked case");
    // transition on the clamped instance: 10 + 900 > 1023? no, 910
    state = ST_TRANSITION; #1;
    chk(g_c, 910, "g_c transition");
    state = ST_RISING; #1;
    chk(g_c, 0, "g_c clamp at zero");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
