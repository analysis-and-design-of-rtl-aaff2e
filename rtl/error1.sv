// error1: error history of the 1 MHz (ID) channel.
//
// On each Clk1 strobe the ADC1 code is subtracted from the reference code,
// e = vref - vo, and a three-deep history is shifted: e1n (present sample),
// e1n1 (one switching period earlier) and e1n2 (two periods earlier). Each tap
// is kept as a magnitude plus a sign bit, the form in which the algorithm and
// d_correction blocks consume it. A positive error (sign 0) means the output
// is below the reference.
//
// Interface: clk, active-low n_rst, clk1_en (one-clock Clk1 strobe), vo and
// vref codes. Timing: the taps change on the clock edge that samples the
// strobe, and upd1 pulses for the following clock to say that the taps are
// fresh; downstream registers use upd1 as their Clk1 update.
//
// The three taps and their sign bits follow the source; the sign convention
// (sign 1 = negative, zero counts as positive), the reset to zero and the
// upd1 pulse are this design's choices.
module error1 #(
  parameter int unsigned ADC_W = ssa_pid_pkg::ADC_W
) (
  input  logic             clk,
  input  logic             n_rst,
  input  logic             clk1_en,
  input  logic [ADC_W-1:0] vo,
  input  logic [ADC_W-1:0] vref,
  output logic [ADC_W-1:0] e1n,
  output logic [ADC_W-1:0] e1n1,
  output logic [ADC_W-1:0] e1n2,
  output logic             e1n_sign,
  output logic             e1n1_sign,
  output logic             e1n2_sign,
  output logic             upd1
);

  logic signed [ADC_W:0] diff;
  logic        [ADC_W-1:0] mag;

  always_comb begin
    diff = $signed({1'b0, vref}) - $signed({1'b0, vo});
    mag  = diff[ADC_W] ? ADC_W'(-diff) : diff[ADC_W-1:0];
  end

  always_ff @(posedge clk or negedge n_rst) begin
    if (!n_rst) begin
      e1n  <= '0;  e1n1 <= '0;  e1n2 <= '0;
      e1n_sign <= 1'b0;  e1n1_sign <= 1'b0;  e1n2_sign <= 1'b0;
      upd1 <= 1'b0;
    end else begin
      upd1 <= clk1_en;
      if (clk1_en) begin
        e1n2      <= e1n1;
        e1n2_sign <= e1n1_sign;
        e1n1      <= e1n;
        e1n1_sign <= e1n_sign;
        e1n       <= mag;
        e1n_sign  <= diff[ADC_W];
      end
    end
  end

endmodule
