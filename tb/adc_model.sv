// adc_model: behavioural model of an A/D converter (simulation only).
// Converts the analogue input continuously: code = floor(v / LSB), limited to
// 0 .. 2**BITS - 1. The controller takes the code at its sample strobe.
module adc_model #(
  parameter int  BITS = 8,
  parameter real LSB  = 0.01
) (
  input  real              v,
  output logic [BITS-1:0]  code
);
  real q;
  always_comb begin
    q = v / LSB;
    if (q <= 0.0)                    code = '0;
    else if (q >= real'((1 << BITS) - 1)) code = '1;
    else                             code = BITS'($rtoi(q));
  end
endmodule
