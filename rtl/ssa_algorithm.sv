// ssa_algorithm: adaptive gain selection and the five error products.
//
// Two independent channels share this block. The ID channel (1 MHz) runs a
// state_selector on e1n/e1n1 and picks the integral and derivative gains
//   Ki' = Ki + beta,  Kd' = Kd + gamma,
// from which it forms the incremental-PID coefficients a = Ki' + Kd',
// b = 2*Kd' and c = Kd' and the products |a*e1n|, |b*e1n1|, |c*e1n2|.
// The P channel (4 MHz) runs its own state_selector on e4n/e4n1, picks
//   Kp' = Kp + alpha  (called d below)
// and forms |d*e4n| and |d*e4n1|. Signs are not applied here; d_correction
// does that with the sign bits from the error blocks.
//
// Interface: magnitudes and sign bits from error1 and error2, and their
// update pulses upd1 / upd4, which clock the peak detectors. The products and
// the channel states are combinational from the error taps, so they are valid
// in the clock cycle in which upd1 / upd4 is high.
//
// The structure (two comparator/selector groups, the adder for a, the
// doubler for b, multipliers on each tap) follows the source. Gains, deltas
// and thresholds are parameters with this design's default values; the source
// prints none. The products are plain multiplications here.
module ssa_algorithm #(
  parameter int unsigned ADC_W  = ssa_pid_pkg::ADC_W,
  parameter int unsigned RES_W  = ssa_pid_pkg::ADC2_RES,
  parameter int unsigned GAIN_W = ssa_pid_pkg::GAIN_W,
  parameter int unsigned KP     = ssa_pid_pkg::KP_DEF,
  parameter int unsigned KI     = ssa_pid_pkg::KI_DEF,
  parameter int unsigned KD     = ssa_pid_pkg::KD_DEF,
  parameter int          DKP    = ssa_pid_pkg::DKP_DEF,
  parameter int          DKP1   = ssa_pid_pkg::DKP1_DEF,
  parameter int          DKI    = ssa_pid_pkg::DKI_DEF,
  parameter int          DKI1   = ssa_pid_pkg::DKI1_DEF,
  parameter int          DKD    = ssa_pid_pkg::DKD_DEF,
  parameter int unsigned VTHR1  = ssa_pid_pkg::VTHR1_DEF,
  parameter int unsigned VTHR4  = ssa_pid_pkg::VTHR4_DEF,
  localparam int unsigned P1_W  = GAIN_W + 1 + ADC_W,
  localparam int unsigned P4_W  = GAIN_W + RES_W
) (
  input  logic                      clk,
  input  logic                      n_rst,
  input  logic                      upd1,
  input  logic                      upd4,
  input  logic [ADC_W-1:0]          e1n,
  input  logic [ADC_W-1:0]          e1n1,
  input  logic [ADC_W-1:0]          e1n2,
  input  logic                      e1n_sign,
  input  logic                      e1n1_sign,
  input  logic [RES_W-1:0]          e4n,
  input  logic [RES_W-1:0]          e4n1,
  input  logic                      e4n_sign,
  input  logic                      e4n1_sign,
  output logic [P1_W-1:0]           ae1n,
  output logic [P1_W-1:0]           be1n1,
  output logic [P1_W-1:0]           ce1n2,
  output logic [P4_W-1:0]           de4n,
  output logic [P4_W-1:0]           de4n1,
  output ssa_pid_pkg::adapt_state_e state1,
  output ssa_pid_pkg::adapt_state_e state4
);
  import ssa_pid_pkg::*;

  logic [ADC_W-1:0]  peak1;
  logic [RES_W-1:0]  peak4;
  logic [GAIN_W-1:0] ki_g, kd_g, kp_g;
  logic [GAIN_W:0]   a, b, c;

  // ---- ID channel -------------------------------------------------------
  state_selector #(.MAG_W(ADC_W), .VTHR(VTHR1)) u_sel1 (
    .clk, .n_rst, .upd(upd1),
    .e_n(e1n), .e_n1(e1n1), .e_n_sign(e1n_sign), .e_n1_sign(e1n1_sign),
    .state(state1), .peak(peak1)
  );

  adaptive_gain #(.MAG_W(ADC_W), .GAIN_W(GAIN_W), .K(KI), .DK(DKI), .DK1(DKI1),
                  .SCALE_FALL(1'b1)) u_ki (
    .state(state1), .e_n(e1n), .peak(peak1), .gain(ki_g)
  );

  adaptive_gain #(.MAG_W(ADC_W), .GAIN_W(GAIN_W), .K(KD), .DK(DKD), .DK1(DKD),
                  .SCALE_FALL(1'b0)) u_kd (
    .state(state1), .e_n(e1n), .peak(peak1), .gain(kd_g)
  );

  // ---- P channel --------------------------------------------------------
  state_selector #(.MAG_W(RES_W), .VTHR(VTHR4)) u_sel4 (
    .clk, .n_rst, .upd(upd4),
    .e_n(e4n), .e_n1(e4n1), .e_n_sign(e4n_sign), .e_n1_sign(e4n1_sign),
    .state(state4), .peak(peak4)
  );

  adaptive_gain #(.MAG_W(RES_W), .GAIN_W(GAIN_W), .K(KP), .DK(DKP), .DK1(DKP1),
                  .SCALE_FALL(1'b1)) u_kp (
    .state(state4), .e_n(e4n), .peak(peak4), .gain(kp_g)
  );

  // ---- coefficients and products ----------------------------------------
  always_comb begin
    a     = {1'b0, ki_g} + {1'b0, kd_g};
    b     = {kd_g, 1'b0};
    c     = {1'b0, kd_g};
    ae1n  = P1_W'(a) * P1_W'(e1n);
    be1n1 = P1_W'(b) * P1_W'(e1n1);
    ce1n2 = P1_W'(c) * P1_W'(e1n2);
    de4n  = P4_W'(kp_g) * P4_W'(e4n);
    de4n1 = P4_W'(kp_g) * P4_W'(e4n1);
  end

endmodule
