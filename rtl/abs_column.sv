// Digit-pipelined absolute value column of the DCORDIC angle path.
//
// The column takes a carry-save number of R digits that arrives MSD first in
// time skew: digit j (row j, weight 2^-j, row 0 the sign digit) is valid one
// clock after digit j-1. Row 0 only classifies the MSD (0 or 2 versus 1) and
// always emits 0, since a magnitude has a zero sign digit. Rows 1..R-2 are
// abs_cell instances and row R-1 is the LSD cell with the sign decoder. The
// two-bit sign state is latched between rows, so it travels down the column
// together with the digits.
//
// Timing: if digit j is valid on the inputs in cycle F+j, the registered
// output digit j is valid in cycle F+1+j. sigma_in must be valid in cycle
// F+R-1; sigma_hat, sigma_tld, sigma_out and singular are valid in cycle F+R.
// singular flags an LSD digit of value 2 reached with the sign still open,
// which the angle mapper uses to recognise its two singular inputs.
// Digit vectors are indexed by bit R-1-j for row j, so they read as two's
// complement vectors with the MSD on the left.
module abs_column
  import dcordic_pkg::*;
#(
  parameter int R = 18
) (
  input  logic         clk,
  input  logic         reset,
  input  logic [R-1:0] c_in,
  input  logic [R-1:0] s_in,
  input  logic         sigma_in,
  output logic [R-1:0] c_out,
  output logic [R-1:0] s_out,
  output logic         sigma_hat,
  output logic         sigma_tld,
  output logic         sigma_out,
  output logic         singular
);

  abs_sign_e sgn_q [1:R-1];   // sign state latched into row j
  logic [R-1:0] c_d, s_d;

  // row 0: MSD classification
  always_ff @(posedge clk) begin
    if (reset) sgn_q[1] <= MSD02;
    else       sgn_q[1] <= (c_in[R-1] == s_in[R-1]) ? MSD02 : MSD1;
  end
  assign c_d[R-1] = 1'b0;
  assign s_d[R-1] = 1'b0;

  for (genvar j = 1; j < R - 1; j++) begin : g_row
    abs_sign_e so;
    abs_cell u_cell (
      .sign_in  (sgn_q[j]),
      .carry_in (c_in[R-1-j]),
      .sum_in   (s_in[R-1-j]),
      .carry_out(c_d[R-1-j]),
      .sum_out  (s_d[R-1-j]),
      .sign_out (so)
    );
    always_ff @(posedge clk) begin
      if (reset) sgn_q[j+1] <= MSD02;
      else       sgn_q[j+1] <= so;
    end
  end

  abs_sign_e lsd_so;
  logic sh, st, so_sig;
  abs_lsd_cell u_lsd (
    .sign_in  (sgn_q[R-1]),
    .carry_in (c_in[0]),
    .sum_in   (s_in[0]),
    .sigma_in (sigma_in),
    .carry_out(c_d[0]),
    .sum_out  (s_d[0]),
    .sign_out (lsd_so),
    .sigma_hat(sh),
    .sigma_tld(st),
    .sigma_out(so_sig)
  );

  always_ff @(posedge clk) begin
    if (reset) begin
      c_out     <= '0;
      s_out     <= '0;
      sigma_hat <= 1'b0;
      sigma_tld <= 1'b0;
      sigma_out <= 1'b0;
      singular  <= 1'b0;
    end else begin
      c_out     <= c_d;
      s_out     <= s_d;
      sigma_hat <= sh;
      sigma_tld <= st;
      sigma_out <= so_sig;
      singular  <= (lsd_so == MSD02 || lsd_so == MSD1) && c_in[0] && s_in[0];
    end
  end

endmodule
