// tb_ssa_algorithm: self-checking test of ssa_algorithm at its default gains.
// Random error taps drive both channels; update pulses move the peak
// detectors. The expected gains come from ssa_ref_pkg::gain_ref with an
// independent peak model, and the five products are recomputed with integers.
// All four states must occur in both channels.
module tb_ssa_algorithm;
  import ssa_pid_pkg::*;
  import ssa_ref_pkg::*;
  logic clk = 0, n_rst = 0, upd1 = 0, upd4 = 0;
  logic [7:0] e1n = 0, e1n1 = 0, e1n2 = 0;
  logic e1n_sign = 0, e1n1_sign = 0;
  logic [5:0] e4n = 0, e4n1 = 0;
  logic e4n_sign = 0, e4n1_sign = 0;
  logic [18:0] ae1n, be1n1, ce1n2;
  logic [15:0] de4n, de4n1;
  adapt_state_e state1, state4;
  int checks = 0, failures = 0;
  int pk1 = 0, pk4 = 0;
  int seen1[4] = '{0, 0, 0, 0};
  int seen4[4] = '{0, 0, 0, 0};

  ssa_algorithm dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
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

  function automatic int sgnd(int m, bit s);
    return s ? -m : m;
  endfunction

  initial begin
    int s1, s4, ki, kd, kp;
    repeat (3) @(negedge clk);
    n_rst = 1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      e1n  = ($urandom % 2) ? 8'($urandom % 16) : 8'($urandom);
      e1n1 = ($urandom % 4 == 0) ? e1n : 8'($urandom % 64);
      e1n2 = 8'($urandom);
      e4n  = 6'($urandom % 8);
      e4n1 = ($urandom % 4 == 0) ? e4n : 6'($urandom % 8);
      if (i % 9 == 0) begin e4n = 6'h3f; e1n = 8'hff; end
      {e1n_sign, e1n1_sign, e4n_sign, e4n1_sign} = 4'($urandom);
      // the error blocks never emit a negative zero
      if (e1n == 0) e1n_sign = 0;
      if (e1n1 == 0) e1n1_sign = 0;
      if (e4n == 0) e4n_sign = 0;
      if (e4n1 == 0) e4n1_sign = 0;
      upd1 = $urandom % 2;
      upd4 = $urandom % 2;
      #1;
      s1 = state_ref(sgnd(e1n, e1n_sign), sgnd(e1n1, e1n1_sign), VTHR1_DEF);
      s4 = state_ref(sgnd(e4n, e4n_sign), sgnd(e4n1, e4n1_sign), VTHR4_DEF);
      seen1[s1]++; seen4[s4]++;
      ki = gain_ref(KI_DEF, DKI_DEF, DKI1_DEF, 1'b1, s1, e1n, pk1, 1023);
      kd = gain_ref(KD_DEF, DKD_DEF, DKD_DEF, 1'b0, s1, e1n, pk1, 1023);
      kp = gain_ref(KP_DEF, DKP_DEF, DKP1_DEF, 1'b1, s4, e4n, pk4, 1023);
      chk(state1, s1, "state1");
      chk(state4, s4, "state4");
      chk(ae1n, (ki + kd) * e1n, "ae1n");
      chk(be1n1, 2 * kd * e1n1, "be1n1");
      chk(ce1n2, kd * e1n2, "ce1n2");
      chk(de4n, kp * e4n, "de4n");
      chk(de4n1, kp * e4n1, "de4n1");
      if (upd1 && s1 == 2) pk1 = e1n;
      if (upd4 && s4 == 2) pk4 = e4n;
    end
    for (int s = 0; s < 4; s++) begin
      checks += 2;
      if (seen1[s] == 0 || seen4[s] == 0) begin
        failures++;
        $display("FAIL state %0d not covered", s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
