// error2: error history of the 4 MHz (P) channel.
//
// The P channel uses a fast, low-resolution conversion. On each Clk4 strobe
// the top RES_W bits of the ADC2 code are subtracted from the top RES_W bits
// of the reference code, e = vref - vo, and a two-deep history is shifted:
// e4n (present sample) and e4n1 (one quarter period earlier), each as a
// magnitude in ADC2 LSBs plus a sign bit (1 = negative).
//
// Interface: clk, active-low n_rst, clk4_en (one-clock Clk4 strobe), vo and
// vref codes of ADC_W bits. Timing: the taps change on the clock edge that
// samples the strobe; upd4 pulses for the following clock.
//
// The two taps with sign bits follow the source, as does the reduced
// resolution (ADC2 is printed as "8/6 bits"). Taking the 6 most significant
// bits of an 8-bit word, the sign convention and the reset to zero are this
// design's choices.
module error2 #(
  parameter int unsigned ADC_W = ssa_pid_pkg::ADC_W,
  parameter int unsigned RES_W = ssa_pid_pkg::ADC2_RES
) (
  input  logic             clk,
  input  logic             n_rst,
  input  logic             clk4_en,
  input  logic [ADC_W-1:0] vo,
  input  logic [ADC_W-1:0] vref,
  output logic [RES_W-1:0] e4n,
  output logic [RES_W-1:0] e4n1,
  output logic             e4n_sign,
  output logic             e4n1_sign,
  output logic             upd4
);

  logic signed [RES_W:0]   diff;
  logic        [RES_W-1:0] mag;

  always_comb begin
    diff = $signed({1'b0, vref[ADC_W-1 -: RES_W]}) - $signed({1'b0, vo[ADC_W-1 -: RES_W]});
    mag  = diff[RES_W] ? RES_W'(-diff) : diff[RES_W-1:0];
  end

  always_ff @(posedge clk or negedge n_rst) begin
    if (!n_rst) begin
      e4n  <= '0;  e4n1 <= '0;
      e4n_sign <= 1'b0;  e4n1_sign <= 1'b0;
      upd4 <= 1'b0;
    end else begin
      upd4 <= clk4_en;
      if (clk4_en) begin
        e4n1      <= e4n;
        e4n1_sign <= e4n_sign;
        e4n       <= mag;
        e4n_sign  <= diff[RES_W];
      end
    end
  end

endmodule
