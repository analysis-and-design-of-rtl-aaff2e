// dn_output: duty accumulators and the duty command.
//
// The ID channel accumulates d1n <= d1n + delta_d1 on each Clk1 update and
// the P channel accumulates d4n <= d4n + delta_d2 on each Clk4 update. The
// duty command is their sum, dn = d1n + d4n, with the fractional bits dropped
// and the result clamped to the DPWM range 0 .. 2**DPWM_W - 1.
//
// Interface: clk, active-low n_rst, upd1 / upd4 (one-clock update pulses,
// the Clk1 / Clk4 of the source, delayed to the cycle in which the increments
// are valid), delta_d1 / delta_d2 from d_correction. Timing: the accumulators
// change on the edge at which their pulse is high; dn follows combinationally
// from the accumulator registers. d1n_q / d4n_q expose the accumulators.
//
// The two accumulators and their sum follow the source. Clamping each
// accumulator to +-2**DPWM_W duty LSBs (so that neither winds up while the
// DPWM is saturated), clamping dn, and resetting both accumulators to zero
// (duty 0 after reset) are this design's choices.
module dn_output #(
  parameter int unsigned DPWM_W    = ssa_pid_pkg::DPWM_W,
  parameter int unsigned GAIN_FRAC = ssa_pid_pkg::GAIN_FRAC,
  parameter int unsigned D1_W      = ssa_pid_pkg::GAIN_W + ssa_pid_pkg::ADC_W + 4,
  parameter int unsigned D2_W      = ssa_pid_pkg::GAIN_W + ssa_pid_pkg::ADC2_RES + 2,
  localparam int unsigned ACC_W    = DPWM_W + GAIN_FRAC + 2
) (
  input  logic                    clk,
  input  logic                    n_rst,
  input  logic                    upd1,
  input  logic                    upd4,
  input  logic signed [D1_W-1:0]  delta_d1,
  input  logic signed [D2_W-1:0]  delta_d2,
  output logic [DPWM_W-1:0]       dn,
  output logic signed [ACC_W-1:0] d1n_q,
  output logic signed [ACC_W-1:0] d4n_q
);

  localparam int unsigned SUM_W = ((D1_W > D2_W) ? D1_W : D2_W) + ACC_W + 1;
  localparam logic signed [SUM_W-1:0] LIM  = SUM_W'(64'(1) << (DPWM_W + GAIN_FRAC));
  localparam logic signed [SUM_W-1:0] DMAX = SUM_W'((64'(1) << DPWM_W) - 1);

  function automatic logic signed [ACC_W-1:0] clamp_acc(input logic signed [SUM_W-1:0] v);
    if (v > LIM)       return ACC_W'(LIM);
    else if (v < -LIM) return ACC_W'(-LIM);
    else               return ACC_W'(v);
  endfunction

  logic signed [SUM_W-1:0] d1_next, d4_next, total, total_int;

  always_comb begin
    d1_next   = SUM_W'(d1n_q) + SUM_W'(delta_d1);
    d4_next   = SUM_W'(d4n_q) + SUM_W'(delta_d2);
    total     = SUM_W'(d1n_q) + SUM_W'(d4n_q);
    total_int = total >>> GAIN_FRAC;
    if (total_int < 0)         dn = '0;
    else if (total_int > DMAX) dn = '1;
    else                       dn = total_int[DPWM_W-1:0];
  end

  always_ff @(posedge clk or negedge n_rst) begin
    if (!n_rst) begin
      d1n_q <= '0;
      d4n_q <= '0;
    end else begin
      if (upd1) d1n_q <= clamp_acc(d1_next);
      if (upd4) d4n_q <= clamp_acc(d4_next);
    end
  end

endmodule
