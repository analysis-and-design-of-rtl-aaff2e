// tb_d_correction: self-checking test of d_correction.
// Random product magnitudes (including the largest) and sign bits; the two
// signed sums are recomputed with integers. A hand-worked case is included.
module tb_d_correction;
  logic [18:0] ae1n, be1n1, ce1n2;
  logic [15:0] de4n, de4n1;
  logic e1n_sign, e1n1_sign, e1n2_sign, e4n_sign, e4n1_sign;
  logic signed [21:0] delta_d1;
  logic signed [17:0] delta_d2;
  int checks = 0, failures = 0;
  logic clk = 0;

  d_correction #(.P1_W(19), .P4_W(16)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int sv(int m, bit s);
    return s ? -m : m;
  endfunction

  task automatic chk(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      ae1n  = (i % 13 == 0) ? '1 : 19'($urandom);
      be1n1 = (i % 17 == 0) ? '1 : 19'($urandom);
      ce1n2 = 19'($urandom);
      de4n  = (i % 13 == 0) ? '1 : 16'($urandom);
      de4n1 = 16'($urandom);
      {e1n_sign, e1n1_sign, e1n2_sign, e4n_sign, e4n1_sign} = 5'($urandom);
      #1;
      chk(delta_d1, sv(ae1n, e1n_sign) - sv(be1n1, e1n1_sign) + sv(ce1n2, e1n2_sign), "delta_d1");
      chk(delta_d2, sv(de4n, e4n_sign) - sv(de4n1, e4n1_sign), "delta_d2");
    end
    // 100*3 - 50*(-2) + 10*(-1) = 390 ; 8*(-4) - 8*5 = -72
    ae1n = 300; e1n_sign = 0; be1n1 = 100; e1n1_sign = 1; ce1n2 = 10; e1n2_sign = 1;
    de4n = 32; e4n_sign = 1; de4n1 = 40; e4n1_sign = 0;
    #1;
    chk(delta_d1, 390, "worked d1");
    chk(delta_d2, -72, "worked d2");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
