// ssa_pid_top: digital controller of an SSA-PID controlled buck converter.
//
// The controller closes a voltage loop around a synchronous buck stage
// switched at fs = 2**DPWM_W clock periods (1 MHz from a 1.024 GHz clock by
// default). It contains the SSA-PID compensator and the DPWM. The DPWM counter
// also produces the two sampling strobes: adc1_sample once per period for the
// precise ID channel and adc2_sample four times per period for the fast P
// channel. The converters, the gate driver and the power stage are outside.
//
// Interface:
//   clk, n_rst         system clock (DPWM counter clock), active-low reset
//   adc1_data          ADC1 code of vout (8 bits), taken on adc1_sample
//   adc2_data          ADC2 code of vout (8 bits, 6 used), taken on adc2_sample
//   vref               reference code (180 for 1.8 V at 10 mV per LSB)
//   pwm_a, pwm_a_n     gate commands A / A-bar for S1 / S2
//   adc1_sample        strobe: start of a switching period (Clk1)
//   adc2_sample        strobe: start of each quarter period (Clk4)
//   dn                 present duty command
//   pwm_count          DPWM counter (position within the switching period)
//   state1, state4     ID / P channel state (steady, transition, rising, falling)
// Timing: a code present at a strobe changes dn two clocks later, and the
// DPWM output one clock after that.
module ssa_pid_top #(
  parameter int unsigned ADC_W  = ssa_pid_pkg::ADC_W,
  parameter int unsigned RES_W  = ssa_pid_pkg::ADC2_RES,
  parameter int unsigned DPWM_W = ssa_pid_pkg::DPWM_W
) (
  input  logic                      clk,
  input  logic                      n_rst,
  input  logic [ADC_W-1:0]          adc1_data,
  input  logic [ADC_W-1:0]          adc2_data,
  input  logic [ADC_W-1:0]          vref,
  output logic                      pwm_a,
  output logic                      pwm_a_n,
  output logic                      adc1_sample,
  output logic                      adc2_sample,
  output logic [DPWM_W-1:0]         dn,
  output logic [DPWM_W-1:0]         pwm_count,
  output ssa_pid_pkg::adapt_state_e state1,
  output ssa_pid_pkg::adapt_state_e state4
);

  ssa_pid_compensator #(.ADC_W(ADC_W), .RES_W(RES_W), .DPWM_W(DPWM_W)) u_comp (
    .clk, .n_rst, .clk1_en(adc1_sample), .clk4_en(adc2_sample),
    .vo1(adc1_data), .vo4(adc2_data), .vref, .dn, .state1, .state4
  );

  dpwm #(.DPWM_W(DPWM_W)) u_dpwm (
    .clk, .n_rst, .duty(dn), .pwm_a, .pwm_a_n,
    .clk1_en(adc1_sample), .clk4_en(adc2_sample), .cnt(pwm_count)
  );

endmodule
