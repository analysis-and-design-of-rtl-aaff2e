// adaptive_gain: one self-adjusting gain of the SSA-PID controller.
//
// The gain is the base value K plus an adjustment chosen by the channel state:
//   steady      0
//   transition  DK1
//   rising      DK
//   falling     DK * |e(n)| / peak   (DK when SCALE_FALL is 0)
// so a large error raises the loop bandwidth, the boost fades as the error
// shrinks from its peak, and a sign change (the error crossing the reference)
// applies DK1, which may be negative to calm the loop. The sum is clamped to
// the range of an unsigned GAIN_W-bit number.
//
// Interface: state and peak from state_selector, the present error magnitude.
// The block is purely combinational. Gains are unsigned fixed point with the
// package's GAIN_FRAC fractional bits; DK and DK1 are signed in that format.
//
// The four-way rule follows the source's equations for the proportional and
// integral adjustments (alpha, beta); SCALE_FALL = 0 gives the derivative
// adjustment (gamma), which is DK in every non-steady state. The guard that
// uses DK unscaled when the peak is zero or not above |e(n)| and the clamp
// are this design's choices.
module adaptive_gain #(
  parameter int unsigned MAG_W      = ssa_pid_pkg::ADC_W,
  parameter int unsigned GAIN_W     = ssa_pid_pkg::GAIN_W,
  parameter int unsigned K          = ssa_pid_pkg::KI_DEF,
  parameter int          DK         = ssa_pid_pkg::DKI_DEF,
  parameter int          DK1        = ssa_pid_pkg::DKI1_DEF,
  parameter bit          SCALE_FALL = 1'b1
) (
  input  ssa_pid_pkg::adapt_state_e state,
  input  logic [MAG_W-1:0]          e_n,
  input  logic [MAG_W-1:0]          peak,
  output logic [GAIN_W-1:0]         gain
);
  import ssa_pid_pkg::*;

  localparam int unsigned DKMAG = (DK < 0) ? -DK : DK;
  localparam int unsigned SUM_W = GAIN_W + 2;

  logic [GAIN_W+MAG_W-1:0] prod;
  logic [GAIN_W+MAG_W-1:0] scaled;
  logic signed [SUM_W-1:0] adj;
  logic signed [SUM_W-1:0] sum;

  always_comb begin
    prod   = (GAIN_W+MAG_W)'(DKMAG) * (GAIN_W+MAG_W)'(e_n);
    if (peak == '0 || peak <= e_n) scaled = (GAIN_W+MAG_W)'(DKMAG);
    else                           scaled = prod / (GAIN_W+MAG_W)'(peak);
    unique case (state)
      ST_STEADY:     adj = '0;
      ST_TRANSITION: adj = SUM_W'(DK1);
      ST_RISING:     adj = SUM_W'(DK);
      ST_FALLING: begin
        if (SCALE_FALL) adj = (DK < 0) ? -$signed(SUM_W'(scaled)) : $signed(SUM_W'(scaled));
        else            adj = SUM_W'(DK);
      end
      default:       adj = '0;
    endcase
    sum = $signed(SUM_W'(K)) + adj;
    if (sum < 0)                                  gain = '0;
    else if (sum > $signed(SUM_W'((1 << GAIN_W) - 1))) gain = '1;
    else                                          gain = sum[GAIN_W-1:0];
  end

endmodule
