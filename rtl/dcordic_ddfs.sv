// DCORDIC direct digital frequency synthesizer (top).
//
// Generates a quadrature sinusoid at phase_inc / 2^PA_W of the clock rate,
// one sample per clock, with no carry propagation anywhere in the loop or the
// angle path:
//   phase_inc_loader  -> skewed two-step load of the increment (P, then 2P)
//   online_phase_acc  -> carry-save accumulator, output MSD first, skewed
//   dcordic_angle_path-> angle mapping plus N_ITER DCORDIC iterations, a
//                        bit-level systolic array emitting one rotation
//                        direction every two clocks
//   xy_datapath       -> N_ITER carry-save rotations of the constant vector
//                        (1/K_n, 0), two pipeline stages per rotation
// The outputs are carry-save: cos = carry_x + sum_x and sin = carry_y + sum_y
// (mod 2^(DW+2), DW fractional bits), to be negated when negate is 1. The
// angle residue is the carry-save angle left after the last iteration, with
// digit j (bit AF+1-j) delayed j clocks behind digit 0.
//
// Defaults are the larger of the two synthesized configurations of the
// design: 15-digit accumulator, 15 iterations, 16-bit alpha fraction, 17-bit
// datapath fraction. Reset is synchronous and clears every latch.
//
// Timing: if load_phase_inc is high in cycle t, sample t+2+n (n >= 0) has the
// phase x + (n+1)*P and leaves the datapath in cycle t+2+n+LATENCY, with
// LATENCY = AF + 2*N_ITER + 5; the sample at the switch itself (n = 0) is the
// one off-sequence sample of an on-the-fly switch unless the accumulator was
// idle. Accumulator phase x is the one reached before the switch.
module dcordic_ddfs #(
  parameter int PA_W   = 15,
  parameter int N_ITER = 15,
  parameter int AF     = 16,
  parameter int DW     = 17
) (
  input  logic            clk,
  input  logic            reset,
  input  logic [PA_W-2:0] phase_inc,
  input  logic            load_phase_inc,
  output logic            negate,
  output logic [DW+1:0]   datapath_carry_x,
  output logic [DW+1:0]   datapath_sum_x,
  output logic [DW+1:0]   datapath_carry_y,
  output logic [DW+1:0]   datapath_sum_y,
  output logic [AF+1:0]   angle_residue_carry,
  output logic [AF+1:0]   angle_residue_sum
);

  logic [PA_W-1:0]   inc, en, acc_c, acc_s;
  logic              busy_unused;
  logic [N_ITER-1:0] d;
  logic              neg_early;

  phase_inc_loader #(.PA_W(PA_W)) u_loader (
    .clk, .reset, .phase_inc, .load_phase_inc, .inc, .en, .busy(busy_unused)
  );

  online_phase_acc #(.PA_W(PA_W)) u_acc (
    .clk, .reset, .inc, .en, .acc_c, .acc_s
  );

  dcordic_angle_path #(.PA_W(PA_W), .N_ITER(N_ITER), .AF(AF)) u_angle (
    .clk, .reset, .acc_c, .acc_s, .d, .negate(neg_early),
    .residue_c(angle_residue_carry), .residue_s(angle_residue_sum)
  );

  xy_datapath #(.DW(DW), .N_ITER(N_ITER)) u_xy (
    .clk, .reset, .d, .negate_in(neg_early),
    .xc(datapath_carry_x), .xs(datapath_sum_x), .yc(datapath_carry_y), .ys(datapath_sum_y),
    .negate
  );

endmodule
