// state_selector: state classification of one SSA-PID channel.
//
// This is the comparator network of the algorithm block. Comparator1 checks
// the present error magnitude against the threshold Vthr, a sign comparator
// checks whether the error changed sign, and Comparator2 checks whether the
// error magnitude is growing or shrinking. The result is one of four states:
//   steady      |e(n)| <  Vthr
//   transition  |e(n)| >= Vthr and sign(e(n)) != sign(e(n-1))
//   rising      |e(n)| >= Vthr, same sign, |e(n-1)| <= |e(n)|
//   falling     |e(n)| >= Vthr, same sign, |e(n-1)| >  |e(n)|
// The channel also detects the error peak: on an update in the rising state
// the peak register takes |e(n)|, and the falling state scales its gain
// adjustment by |e(n)| / peak.
//
// Interface: the present and previous error magnitudes and sign bits from
// error1 or error2, and upd, the one-clock pulse at which the taps are fresh.
// state is combinational from the taps; peak changes on the clock edge at
// which upd is high.
//
// The four states, the comparisons and the peak rule follow the source. The
// threshold test "|e| >= Vthr means transient" follows the equations; a
// zero previous error counts as positive in the sign comparison.
module state_selector #(
  parameter int unsigned MAG_W = ssa_pid_pkg::ADC_W,
  parameter int unsigned VTHR  = ssa_pid_pkg::VTHR1_DEF
) (
  input  logic                       clk,
  input  logic                       n_rst,
  input  logic                       upd,
  input  logic [MAG_W-1:0]           e_n,
  input  logic [MAG_W-1:0]           e_n1,
  input  logic                       e_n_sign,
  input  logic                       e_n1_sign,
  output ssa_pid_pkg::adapt_state_e  state,
  output logic [MAG_W-1:0]           peak
);
  import ssa_pid_pkg::*;

  logic transient;    // Comparator1: Vthr <= |e(n)|
  logic same_sign;    // '=' block on the sign bits
  logic shrinking;    // Comparator2: |e(n-1)| > |e(n)|

  always_comb begin
    transient = ({1'b0, e_n} >= (MAG_W+1)'(VTHR));
    same_sign = (e_n_sign == e_n1_sign);
    shrinking = (e_n1 > e_n);
    if (!transient)      state = ST_STEADY;
    else if (!same_sign) state = ST_TRANSITION;
    else if (shrinking)  state = ST_FALLING;
    else                 state = ST_RISING;
  end

  always_ff @(posedge clk or negedge n_rst) begin
    if (!n_rst)                           peak <= '0;
    else if (upd && state == ST_RISING)   peak <= e_n;
  end

endmodule
