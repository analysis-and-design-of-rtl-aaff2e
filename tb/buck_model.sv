// buck_model: behavioural model of a synchronous buck power stage (not
// synthesizable; for simulation only).
//
// Switch node: vin while the high-side gate command A is on, 0 V while the
// low-side command A_n is on (the rectifier conducts in both directions).
// State equations, integrated with forward Euler once per clock of period
// DT seconds:
//   L diL/dt = vsw - vout - rl*iL
//   C dvc/dt = iL - iout
//   vout     = vc + rc*(iL - iout),  iout = vout/r_load + i_step
// Default element values are 4.7 uH (80 mOhm DCR) and 10 uF (70 mOhm ESR).
module buck_model #(
  parameter real L  = 4.7e-6,
  parameter real RL = 0.08,
  parameter real C  = 10e-6,
  parameter real RC = 0.07,
  parameter real DT = 0.976e-9
) (
  input  logic clk,
  input  logic a,
  input  logic a_n,
  input  real  vin,
  input  real  r_load,
  input  real  i_step,
  output real  vout,
  output real  il
);
  real vc = 0.0;
  real vsw, iout, v;

  initial begin
    il   = 0.0;
    vout = 0.0;
  end

  always @(posedge clk) begin
    vsw  = a ? vin : (a_n ? 0.0 : vout);
    // solve vout = vc + rc*(il - vout/r_load - i_step) for vout
    v    = (vc + RC * (il - i_step)) / (1.0 + RC / r_load);
    iout = v / r_load + i_step;
    il   = il + (vsw - v - RL * il) / L * DT;
    vc   = vc + (il - iout) / C * DT;
    vout = (vc + RC * (il - i_step)) / (1.0 + RC / r_load);
  end
endmodule
