// Bit-level systolic angle path of the differential CORDIC (DCORDIC).
//
// DCORDIC replaces the angle recursion z_{i+1} = z_i - sigma_i*alpha_i by
//   |zh_{i+1}| = | |zh_i| - alpha_i |,  sigma_{i+1} = sigma_i * sign(zh_{i+1}),
// which only ever handles magnitudes. Each iteration is a carry-save column
// that adds the constant -alpha_i (alpha_csa_column) followed by an MSD-first
// absolute value column (abs_column); both work digit by digit with the digits
// skewed one clock apart, so the whole path is a two-dimensional systolic
// array with one word accepted per clock. The angle_mapper in front folds the
// accumulator angle into the convergence range.
//
// The angle has R = AF+2 carry-save rows: the sign digit, AF fractional
// digits (the alpha table precision) and one extra LSD row that absorbs the
// two-ulp negation correction. The PA_W accumulator digits feed rows
// 0..PA_W-1; lower rows are zero.
//
// Timing: accumulator digit j valid in cycle A+j. Rotation direction d[k]
// (1 = rotate clockwise) is valid for one cycle in cycle A+R+2+2k; negate is
// valid in cycle A+R+2. The residue zh_N = |zh_{N-1}| - alpha_{N-1} is
// registered, digit j valid in cycle A+2N+3+j (still skewed MSD first).
module dcordic_angle_path
  import dcordic_pkg::*;
#(
  parameter int PA_W   = 15,
  parameter int N_ITER = 15,
  parameter int AF     = 16
) (
  input  logic              clk,
  input  logic              reset,
  input  logic [PA_W-1:0]   acc_c,
  input  logic [PA_W-1:0]   acc_s,
  output logic [N_ITER-1:0] d,
  output logic              negate,
  output logic [AF+1:0]     residue_c,
  output logic [AF+1:0]     residue_s
);

  localparam int R = AF + 2;

  logic [R-1:0] zc [0:N_ITER];   // magnitude entering iteration k
  logic [R-1:0] zs [0:N_ITER];
  logic         tld [0:N_ITER];
  logic         sig [0:N_ITER];

  angle_mapper #(.R(R)) u_map (
    .clk, .reset,
    .c_in ({acc_c, {(R-PA_W){1'b0}}}),
    .s_in ({acc_s, {(R-PA_W){1'b0}}}),
    .c_out(zc[0]), .s_out(zs[0]), .d0(sig[0]), .negate, .sigma_tld(tld[0])
  );
  assign d[0] = sig[0];

  for (genvar k = 0; k < N_ITER; k++) begin : g_iter
    localparam logic [AF:0]  A_NEG = -(AF+1)'(alpha_q(k, AF));
    localparam logic [R-1:0] ALPHA = {A_NEG, 1'b0};
    logic [R-1:0] ac, as_;
    logic         sq;
    alpha_csa_column #(.R(R), .ALPHA(ALPHA)) u_csa (
      .clk, .reset, .c_in(zc[k]), .s_in(zs[k]), .sigma_tld_in(tld[k]), .sigma_in(sig[k]),
      .c_out(ac), .s_out(as_), .sigma_q(sq)
    );
    if (k < N_ITER - 1) begin : g_abs
      logic sh_unused, sg_unused;
      abs_column #(.R(R)) u_abs (
        .clk, .reset, .c_in(ac), .s_in(as_), .sigma_in(sq),
        .c_out(zc[k+1]), .s_out(zs[k+1]), .sigma_hat(sh_unused), .sigma_tld(tld[k+1]),
        .sigma_out(sig[k+1]), .singular(sg_unused)
      );
      assign d[k+1] = sig[k+1];
    end else begin : g_last
      always_ff @(posedge clk) begin
        if (reset) begin
          residue_c <= '0;
          residue_s <= '0;
        end else begin
          residue_c <= ac;
          residue_s <= as_;
        end
      end
      assign zc[N_ITER]  = '0;
      assign zs[N_ITER]  = '0;
      assign tld[N_ITER] = 1'b0;
      assign sig[N_ITER] = sq;
    end
  end

endmodule
