// d_correction: signed duty increments of the two channels.
//
// The algorithm block delivers unsigned product magnitudes; this block
// applies the sign bit of the error tap each product was formed from and adds
//   delta_d1 = a*e1n - b*e1n1 + c*e1n2     (ID channel, once per period)
//   delta_d2 = d*e4n - d*e4n1              (P channel, four times per period)
// Both results are two's complement with the package's GAIN_FRAC fractional
// bits (1/8 duty LSB by default).
//
// Interface: the five magnitudes and five sign bits. Purely combinational.
//
// The two sums follow the source's incremental equations; the word widths
// are wide enough that neither sum can overflow.
module d_correction #(
  parameter int unsigned P1_W = ssa_pid_pkg::GAIN_W + 1 + ssa_pid_pkg::ADC_W,
  parameter int unsigned P4_W = ssa_pid_pkg::GAIN_W + ssa_pid_pkg::ADC2_RES,
  localparam int unsigned D1_W = P1_W + 3,
  localparam int unsigned D2_W = P4_W + 2
) (
  input  logic [P1_W-1:0]        ae1n,
  input  logic [P1_W-1:0]        be1n1,
  input  logic [P1_W-1:0]        ce1n2,
  input  logic [P4_W-1:0]        de4n,
  input  logic [P4_W-1:0]        de4n1,
  input  logic                   e1n_sign,
  input  logic                   e1n1_sign,
  input  logic                   e1n2_sign,
  input  logic                   e4n_sign,
  input  logic                   e4n1_sign,
  output logic signed [D1_W-1:0] delta_d1,
  output logic signed [D2_W-1:0] delta_d2
);

  function automatic logic signed [D1_W-1:0] sgn1(input logic [P1_W-1:0] m, input logic s);
    logic signed [D1_W-1:0] v;
    v = $signed(D1_W'(m));
    return s ? -v : v;
  endfunction

  function automatic logic signed [D2_W-1:0] sgn2(input logic [P4_W-1:0] m, input logic s);
    logic signed [D2_W-1:0] v;
    v = $signed(D2_W'(m));
    return s ? -v : v;
  endfunction

  always_comb begin
    delta_d1 = sgn1(ae1n, e1n_sign) - sgn1(be1n1, e1n1_sign) + sgn1(ce1n2, e1n2_sign);
    delta_d2 = sgn2(de4n, e4n_sign) - sgn2(de4n1, e4n1_sign);
  end

endmodule
