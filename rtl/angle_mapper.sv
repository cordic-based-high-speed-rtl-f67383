// Angle mapping interface between the phase accumulator and the DCORDIC iterations.
//
// The accumulator angle z lies in [-1,1) (pi radians = 1.0) but CORDIC only
// converges for about [-0.55,0.55]. The mapper folds z into [0,1/2]:
//   1. ABS column on the accumulator output: u = |z|, sign sigma_0.
//   2. A carry-save column without alpha adds the two ulps of that negation.
//   3. A second ABS column works on the fractional digits only (rows 1..R-1,
//      which is u times 2 taken mod 2, then halved again): m = u or 1-u.
// The rotation direction of the first iteration is sigma_0 * sigma_hat_1 and
// the negate flag is sigma_hat_1: cos(pi z) = (-1)^negate * cos(pi m) and
// sin(pi z) = (-1)^negate * sin(pi * d0 * m).
// Inputs -1 and -1/2 are singular: the second ABS column sees a zero or -1
// whose sign is only settled at a digit of value 2 in its LSD. When its sign
// decoder sees that pattern the mapper treats the number as negative, which
// makes the negate flag 1; this gives cos = -1 for z = -1 and keeps the sign
// of sine right for z = +-1/2. The exact decoding rule is this design's own:
// the document states only that the two cases are detected from the sign
// decoder inputs.
//
// Row 0 (the integer digit) of the extra column's output and the first ABS
// column's sigma_hat and singular outputs are left unread on purpose: the
// fold discards the integer digit and the first sign is used only through
// the chained sigma_out.
//
// Timing: accumulator digit j valid in cycle A+j (sum latched, carry
// combinational). Output digit j (registered) valid in cycle A+3+j; row 0 of
// the output is always 0. d0, negate and sigma_tld are valid in cycle A+R+2.
module angle_mapper #(
  parameter int R = 18
) (
  input  logic         clk,
  input  logic         reset,
  input  logic [R-1:0] c_in,
  input  logic [R-1:0] s_in,
  output logic [R-1:0] c_out,
  output logic [R-1:0] s_out,
  output logic         d0,
  output logic         negate,
  output logic         sigma_tld
);

  logic [R-1:0] c1, s1, c2, s2;
  logic sh1, st1, so1, sg1;
  logic sig2;

  abs_column #(.R(R)) u_abs_first (
    .clk, .reset, .c_in, .s_in, .sigma_in(1'b0),
    .c_out(c1), .s_out(s1), .sigma_hat(sh1), .sigma_tld(st1), .sigma_out(so1), .singular(sg1)
  );

  alpha_csa_column #(.R(R), .ALPHA('0)) u_csa_extra (
    .clk, .reset, .c_in(c1), .s_in(s1), .sigma_tld_in(st1), .sigma_in(so1),
    .c_out(c2), .s_out(s2), .sigma_q(sig2)
  );

  logic sh2, so2, sg2;
  abs_column #(.R(R-1)) u_abs_map (
    .clk, .reset, .c_in(c2[R-2:0]), .s_in(s2[R-2:0]), .sigma_in(sig2),
    .c_out(c_out[R-2:0]), .s_out(s_out[R-2:0]),
    .sigma_hat(sh2), .sigma_tld(sigma_tld), .sigma_out(so2), .singular(sg2)
  );
  assign c_out[R-1] = 1'b0;
  assign s_out[R-1] = 1'b0;

  // singular inputs: force the sign of the folded angle to minus
  assign negate = sh2 | sg2;
  assign d0     = sg2 ? (so2 ^ sh2 ^ 1'b1) : so2;

endmodule
