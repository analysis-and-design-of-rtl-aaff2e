// ssa_pid_pkg: types and default constants shared by the SSA-PID controller.
//
// The separate-sampling adaptive PID (SSA-PID) controller splits a PID loop
// into an adaptive P channel sampled four times per switching period and an
// adaptive ID channel sampled once per period. Both channels classify their
// error into one of four states, and the state chooses the gain adjustment.
//
// Number formats (this design's choice, the source gives no word formats):
//   * ADC codes and error magnitudes are unsigned integers in ADC LSBs.
//   * Gains are unsigned fixed point with GAIN_FRAC fractional bits, so a
//     gain value G means G / 2**GAIN_FRAC duty LSBs per error LSB.
//   * Gain adjustments (the deltas) are signed in the same format.
//   * The duty accumulators carry GAIN_FRAC fractional bits as well.
// The default gains were chosen for the 5 V -> 1.8 V, 4.7 uH / 10 uF, 1 MHz
// buck stage with an ADC LSB of 10 mV; the source does not print its values.
package ssa_pid_pkg;

  // Channel state, decided by Comparator1/Comparator2/sign check (Fig. 10(b)).
  typedef enum logic [1:0] {
    ST_STEADY     = 2'd0,  // |e(n)| <  Vthr: no adjustment
    ST_TRANSITION = 2'd1,  // |e(n)| >= Vthr and the sign of e changed
    ST_RISING     = 2'd2,  // |e(n)| >= Vthr, same sign, |e(n-1)| <= |e(n)|
    ST_FALLING    = 2'd3   // |e(n)| >= Vthr, same sign, |e(n-1)| >  |e(n)|
  } adapt_state_e;

  // Word sizes printed in the source.
  localparam int unsigned ADC_W    = 8;   // ADC1 / ADC2 data bits
  localparam int unsigned ADC2_RES = 6;   // bits of ADC2 the P channel uses
  localparam int unsigned DPWM_W   = 10;  // DPWM resolution

  // Fixed-point format of the gains (assumed).
  localparam int unsigned GAIN_W    = 10;
  localparam int unsigned GAIN_FRAC = 3;

  // Default base gains (assumed), in units of 1/8 duty LSB per error LSB.
  localparam int unsigned KP_DEF  = 64;   // Kp = 8
  localparam int unsigned KI_DEF  = 2;    // Ki = 0.25
  localparam int unsigned KD_DEF  = 128;  // Kd = 16
  // Default adaptive adjustments (assumed).
  localparam int          DKP_DEF  = 32;  // dKp  = +4
  localparam int          DKP1_DEF = -32; // dKp1 = -4
  localparam int          DKI_DEF  = 2;   // dKi  = +0.25
  localparam int          DKI1_DEF = -1;  // dKi1 = -0.125
  localparam int          DKD_DEF  = 64;  // dKd  = +8
  // Thresholds, in the LSBs of the channel's own ADC (assumed).
  localparam int unsigned VTHR1_DEF = 5;  // 50 mV on the 10 mV ADC1 scale
  localparam int unsigned VTHR4_DEF = 2;  // 80 mV on the 40 mV ADC2 scale

endpackage
