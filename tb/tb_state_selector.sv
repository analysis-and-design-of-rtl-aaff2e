// tb_state_selector: self-checking test of state_selector.
// Random error magnitudes (biased toward the threshold and toward equal
// values) and signs are applied; the state is compared with the rule written
// out from the equations, and the peak register with a model that loads
// |e(n)| on each update in the rising state. Every state must occur.
module tb_state_selector;
  import ssa_pid_pkg::*;
  logic clk = 0, n_rst = 0, upd = 0;
  logic [7:0] e_n = 0, e_n1 = 0;
  logic e_n_sign = 0, e_n1_sign = 0;
  adapt_state_e state;
  logic [7:0] peak;
  int checks = 0, failures = 0;
  int exp_peak = 0;
  int seen[4] = '{0, 0, 0, 0};

  state_selector #(.MAG_W(8), .VTHR(5)) dut (.*);

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
      if (failures < 10) $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  initial begin
    int st, ep, epp;
    repeat (3) @(negedge clk);
    n_rst = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      chk(peak, exp_peak, "peak");
      e_n  = ($urandom % 2) ? 8'($urandom % 12) : 8'($urandom);
      e_n1 = ($urandom % 4 == 0) ? e_n : (($urandom % 2) ? 8'($urandom % 12) : 8'($urandom));
      e_n_sign  = $urandom % 2;
      e_n1_sign = $urandom % 2;
      upd = $urandom % 2;
      ep  = e_n_sign ? -int'(e_n) : int'(e_n);
      epp = e_n1_sign ? -int'(e_n1) : int'(e_n1);
      // a negative zero is a sign bit of 1 with magnitude 0; the rule compares sign bits
      if (e_n < 5) st = 0;
      else if (e_n_sign != e_n1_sign) st = 1;
      else if (e_n1 > e_n) st = 3;
      else st = 2;
      #1;
      chk(int'(state), st, "state");
      seen[st]++;
      if (upd && st == 2) exp_peak = e_n;
    end
    for (int s = 0; s < 4; s++) begin
      checks++;
      if (seen[s] == 0) begin failures++; $display("FAIL state %0d never seen", s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
