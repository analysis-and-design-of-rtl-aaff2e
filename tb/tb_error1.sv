// tb_error1: self-checking test of error1.
// Random ADC and reference codes are applied with random Clk1 strobes. A
// three-deep model of e = vref - vo (as signed integers) predicts every tap's
// magnitude and sign bit and the one-clock-late upd1 pulse.
module tb_error1;
  logic clk = 0, n_rst = 0, clk1_en = 0;
  logic [7:0] vo = 0, vref = 0;
  logic [7:0] e1n, e1n1, e1n2;
  logic e1n_sign, e1n1_sign, e1n2_sign, upd1;
  int checks = 0, failures = 0;
  int m[3] = '{0, 0, 0};
  bit exp_upd = 0;

  error1 dut (.*);

  always #5 clk = ~clk;

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

  initial begin
    repeat (3) @(negedge clk);
    n_rst = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      chk(e1n,  (m[0] < 0) ? -m[0] : m[0], "e1n");
      chk(e1n1, (m[1] < 0) ? -m[1] : m[1], "e1n1");
      chk(e1n2, (m[2] < 0) ? -m[2] : m[2], "e1n2");
      chk(e1n_sign,  m[0] < 0, "e1n_sign");
      chk(e1n1_sign, m[1] < 0, "e1n1_sign");
      chk(e1n2_sign, m[2] < 0, "e1n2_sign");
      chk(upd1, exp_upd, "upd1");
      vo   = 8'($urandom);
      vref = (i % 7 == 0) ? vo : 8'($urandom);
      if (i % 11 == 0) vo = 8'hff;
      clk1_en = ($urandom % 4) == 0;
      exp_upd = clk1_en;
      if (clk1_en) begin
        m[2] = m[1]; m[1] = m[0]; m[0] = int'(vref) - int'(vo);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
