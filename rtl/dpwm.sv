// dpwm: counter-based digital pulse-width modulator and sample timing.
//
// A free-running DPWM_W-bit counter divides the system clock into switching
// periods of 2**DPWM_W clocks (1 MHz from a 1.024 GHz clock at the default
// 10 bits). The output A is high from the start of a period until the counter
// reaches the duty command, and stays low for the rest of the period even if
// the duty command later rises above the counter: at most one pulse per
// period. The duty command is compared live, so a P-channel correction made in
// the middle of a period can still end the present pulse early. The
// complementary output A_n drives the synchronous rectifier.
//
// The same counter times the sampling: clk1_en is high in the first clock of
// each period (Clk1, 1 MHz, the ID channel) and clk4_en in the first clock of
// each quarter period (Clk4, 4 MHz, the P channel), so sampling points line up
// with the switching period.
//
// Interface: clk, active-low n_rst, duty (0 .. 2**DPWM_W-1; 0 gives no pulse).
// Timing: pwm_a / pwm_a_n are registered and lag the counter by one clock,
// giving a pulse of exactly duty clocks for a steady duty command.
//
// The 10-bit resolution, the 1 MHz switching rate and the 1x / 4x sampling
// aligned to the period follow the source. How the DPWM is built (a plain
// counter and comparator), the one-pulse rule and the absence of dead time
// are this design's choices; the source does not describe them.
module dpwm #(
  parameter int unsigned DPWM_W = ssa_pid_pkg::DPWM_W
) (
  input  logic              clk,
  input  logic              n_rst,
  input  logic [DPWM_W-1:0] duty,
  output logic              pwm_a,
  output logic              pwm_a_n,
  output logic              clk1_en,
  output logic              clk4_en,
  output logic [DPWM_W-1:0] cnt
);

  logic ended_q;   // the pulse of this period has already ended
  logic on;

  always_comb begin
    on      = !ended_q && (cnt < duty);
    clk1_en = (cnt == '0);
    clk4_en = (cnt[DPWM_W-3:0] == '0);
  end

  always_ff @(posedge clk or negedge n_rst) begin
    if (!n_rst) begin
      cnt     <= '0;
      ended_q <= 1'b0;
      pwm_a   <= 1'b0;
      pwm_a_n <= 1'b0;
    end else begin
      cnt     <= cnt + 1'b1;
      ended_q <= (cnt == '1) ? 1'b0 : (ended_q || !on);
      pwm_a   <= on;
      pwm_a_n <= !on;
    end
  end

  // Every Clk1 sample point is also a Clk4 sample point (both channels
  // sample together at the start of the period).
  a_clk1_is_clk4: assert property (@(posedge clk) clk1_en |-> clk4_en);

endmodule
