// tb_error2: self-checking test of error2.
// Random 8-bit codes with random Clk4 strobes. The model keeps
// e = vref/4 - vo/4 (integer division, i.e. the 6 upper bits) for the
// present and previous sample and predicts magnitudes, signs and upd4.
module tb_error2;
  logic clk = 0, n_rst = 0, clk4_en = 0;
  logic [7:0] vo = 0, vref = 0;
  logic [5:0] e4n, e4n1;
  logic e4n_sign, e4n1_sign, upd4;
  int checks = 0, failures = 0;
  int m[2] = '{0, 0};
  bit exp_upd = 0;

  error2 dut (.*);

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
      chk(e4n,  (m[0] < 0) ? -m[0] : m[0], "e4n");
      chk(e4n1, (m[1] < 0) ? -m[1] : m[1], "e4n1");
      chk(e4n_sign,  m[0] < 0, "e4n_sign");
      chk(e4n1_sign, m[1] < 0, "e4n1_sign");
      chk(upd4, exp_upd, "upd4");
      vo   = 8'($urandom);
      vref = (i % 5 == 0) ? vo ^ 8'h03 : 8'($urandom);
      clk4_en = ($urandom % 3) == 0;
      exp_upd = clk4_en;
      if (clk4_en) begin
        m[1] = m[0]; m[0] = int'(vref) / 4 - int'(vo) / 4;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
