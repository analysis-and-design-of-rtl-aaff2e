// ssa_pid_compensator: the separate-sampling adaptive PID compensator.
//
// A buck converter's output is measured by two converters. ADC1 (8 bits)
// is sampled once per switching period on Clk1 and feeds the adaptive ID
// channel; ADC2 (fast, used at 6 bits) is sampled four times per period on
// Clk4 and feeds the adaptive P channel. The duty command is
//   dn = d1n + d4n
//   d1n += a*e1n - b*e1n1 + c*e1n2   (a = Ki'+Kd', b = 2Kd', c = Kd')
//   d4n += d*(e4n - e4n1)            (d = Kp')
// where Ki', Kd', Kp' are the base gains plus state-dependent adjustments.
// Because the P channel updates every quarter period, a disturbance reaches
// the duty command within Ts/4 instead of Ts.
//
// Blocks, as in the source's compensator architecture: error1, error2,
// ssa_algorithm, d_correction and dn_output.
//
// Interface: clk (system clock, the DPWM counter clock), active-low n_rst,
// clk1_en / clk4_en (one-clock sample strobes), vo1 / vo4 (ADC1 / ADC2 codes),
// vref (reference code). dn is the DPWM duty command; state1 / state4 show the
// channel states. Timing: vo1 / vo4 are taken on the clock edge at which the
// strobe is high; dn reflects that sample two clock edges later.
//
// The source draws a single vo input; this design takes one code from each
// converter. Widths, gains and thresholds are parameters (see ssa_pid_pkg).
module ssa_pid_compensator #(
  parameter int unsigned ADC_W     = ssa_pid_pkg::ADC_W,
  parameter int unsigned RES_W     = ssa_pid_pkg::ADC2_RES,
  parameter int unsigned DPWM_W    = ssa_pid_pkg::DPWM_W,
  parameter int unsigned GAIN_W    = ssa_pid_pkg::GAIN_W,
  parameter int unsigned GAIN_FRAC = ssa_pid_pkg::GAIN_FRAC,
  parameter int unsigned KP        = ssa_pid_pkg::KP_DEF,
  parameter int unsigned KI        = ssa_pid_pkg::KI_DEF,
  parameter int unsigned KD        = ssa_pid_pkg::KD_DEF,
  parameter int          DKP       = ssa_pid_pkg::DKP_DEF,
  parameter int          DKP1      = ssa_pid_pkg::DKP1_DEF,
  parameter int          DKI       = ssa_pid_pkg::DKI_DEF,
  parameter int          DKI1      = ssa_pid_pkg::DKI1_DEF,
  parameter int          DKD       = ssa_pid_pkg::DKD_DEF,
  parameter int unsigned VTHR1     = ssa_pid_pkg::VTHR1_DEF,
  parameter int unsigned VTHR4     = ssa_pid_pkg::VTHR4_DEF
) (
  input  logic                      clk,
  input  logic                      n_rst,
  input  logic                      clk1_en,
  input  logic                      clk4_en,
  input  logic [ADC_W-1:0]          vo1,
  input  logic [ADC_W-1:0]          vo4,
  input  logic [ADC_W-1:0]          vref,
  output logic [DPWM_W-1:0]         dn,
  output ssa_pid_pkg::adapt_state_e state1,
  output ssa_pid_pkg::adapt_state_e state4
);

  localparam int unsigned P1_W  = GAIN_W + 1 + ADC_W;
  localparam int unsigned P4_W  = GAIN_W + RES_W;
  localparam int unsigned D1_W  = P1_W + 3;
  localparam int unsigned D2_W  = P4_W + 2;
  localparam int unsigned ACC_W = DPWM_W + GAIN_FRAC + 2;

  logic [ADC_W-1:0] e1n, e1n1, e1n2;
  logic             e1n_sign, e1n1_sign, e1n2_sign, upd1;
  logic [RES_W-1:0] e4n, e4n1;
  logic             e4n_sign, e4n1_sign, upd4;
  logic [P1_W-1:0]  ae1n, be1n1, ce1n2;
  logic [P4_W-1:0]  de4n, de4n1;
  logic signed [D1_W-1:0]  delta_d1;
  logic signed [D2_W-1:0]  delta_d2;
  logic signed [ACC_W-1:0] d1n_q, d4n_q;

  error1 #(.ADC_W(ADC_W)) u_error1 (
    .clk, .n_rst, .clk1_en, .vo(vo1), .vref,
    .e1n, .e1n1, .e1n2, .e1n_sign, .e1n1_sign, .e1n2_sign, .upd1
  );

  error2 #(.ADC_W(ADC_W), .RES_W(RES_W)) u_error2 (
    .clk, .n_rst, .clk4_en, .vo(vo4), .vref,
    .e4n, .e4n1, .e4n_sign, .e4n1_sign, .upd4
  );

  ssa_algorithm #(
    .ADC_W(ADC_W), .RES_W(RES_W), .GAIN_W(GAIN_W),
    .KP(KP), .KI(KI), .KD(KD), .DKP(DKP), .DKP1(DKP1), .DKI(DKI), .DKI1(DKI1),
    .DKD(DKD), .VTHR1(VTHR1), .VTHR4(VTHR4)
  ) u_algorithm (
    .clk, .n_rst, .upd1, .upd4,
    .e1n, .e1n1, .e1n2, .e1n_sign, .e1n1_sign,
    .e4n, .e4n1, .e4n_sign, .e4n1_sign,
    .ae1n, .be1n1, .ce1n2, .de4n, .de4n1, .state1, .state4
  );

  d_correction #(.P1_W(P1_W), .P4_W(P4_W)) u_d_correction (
    .ae1n, .be1n1, .ce1n2, .de4n, .de4n1,
    .e1n_sign, .e1n1_sign, .e1n2_sign, .e4n_sign, .e4n1_sign,
    .delta_d1, .delta_d2
  );

  dn_output #(.DPWM_W(DPWM_W), .GAIN_FRAC(GAIN_FRAC), .D1_W(D1_W), .D2_W(D2_W)) u_dn_output (
    .clk, .n_rst, .upd1, .upd4, .delta_d1, .delta_d2, .dn, .d1n_q, .d4n_q
  );

endmodule
