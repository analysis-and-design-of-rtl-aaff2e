// tb_dn_output: self-checking test of dn_output.
// Random increments with random update pulses drive the accumulators into
// and out of both clamps; integer models of d1n, d4n and the clamped
// duty dn = (d1n + d4n) >> 3 are compared every clock.
module tb_dn_output;
  logic clk = 0, n_rst = 0, upd1 = 0, upd4 = 0;
  logic signed [21:0] delta_d1 = 0;
  logic signed [17:0] delta_d2 = 0;
  logic [9:0] dn;
  logic signed [14:0] d1n_q, d4n_q;
  int checks = 0, failures = 0;
  longint m1 = 0, m4 = 0;
  int hi = 0, lo = 0, mid = 0;

  dn_output #(.DPWM_W(10), .GAIN_FRAC(3), .D1_W(22), .D2_W(18)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint clampv(longint v, longint lo_l, longint hi_l);
    return (v < lo_l) ? lo_l : (v > hi_l) ? hi_l : v;
  endfunction

  task automatic chk(longint got, longint exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  initial begin
    longint t;
    repeat (3) @(negedge clk);
    n_rst = 1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      chk(d1n_q, m1, "d1n");
      chk(d4n_q, m4, "d4n");
      t = clampv((m1 + m4) >>> 3, 0, 1023);
      chk(dn, t, "dn");
      if (t == 1023) hi++; else if (t == 0) lo++; else mid++;
      upd1 = ($urandom % 3) == 0;
      upd4 = ($urandom % 2) == 0;
      // slow random walk with occasional big kicks
      delta_d1 = (i % 50 == 0) ? 22'($signed($urandom % 40000) - 20000) : 22'($signed($urandom % 801) - 400);
      delta_d2 = 18'($signed($urandom % 601) - 300);
      if ((i / 1000) % 2 == 1) delta_d1 = -delta_d1 + 22'sd50;
      if (upd1) m1 = clampv(m1 + delta_d1, -8192, 8192);
      if (upd4) m4 = clampv(m4 + delta_d2, -8192, 8192);
    end
    checks++;
    if (hi == 0 || lo == 0 || mid == 0) begin
      failures++;
      $display("FAIL coverage hi %0d lo %0d mid %0d", hi, lo, mid);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
