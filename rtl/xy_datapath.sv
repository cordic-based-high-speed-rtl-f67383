// Carry-save sine/cosine datapath of the DCORDIC frequency synthesizer.
//
// N_ITER xy_stage rotations turn the constant prescaled vector
// (x0, y0) = (1/K_n, 0), 1/K_n rounded to DW fractional bits, into
// (cos, sin) of the angle whose rotation directions arrive on d. Because the
// initial vector is a constant, no input latches are needed: stage k simply
// starts whenever its direction d[k] arrives. The negate flag of the angle
// mapper is delayed through 2*N_ITER latches so that it leaves with the
// vector it belongs to. Outputs stay in carry-save form; the value is
// carry + sum mod 2^(DW+2), with DW fractional bits.
//
// Timing: d[k] must be valid in cycle t+2k (negate in cycle t); the outputs
// for that sample are valid in cycle t+2*N_ITER.
module xy_datapath
  import dcordic_pkg::*;
#(
  parameter int DW     = 17,
  parameter int N_ITER = 15
) (
  input  logic              clk,
  input  logic              reset,
  input  logic [N_ITER-1:0] d,
  input  logic              negate_in,
  output logic [DW+1:0]     xc,
  output logic [DW+1:0]     xs,
  output logic [DW+1:0]     yc,
  output logic [DW+1:0]     ys,
  output logic              negate
);

  localparam logic [DW+1:0] X0 = (DW+2)'(inv_gain_q(N_ITER, DW));

  logic [DW+1:0] vxc [0:N_ITER];
  logic [DW+1:0] vxs [0:N_ITER];
  logic [DW+1:0] vyc [0:N_ITER];
  logic [DW+1:0] vys [0:N_ITER];

  assign vxc[0] = '0;
  assign vxs[0] = X0;
  assign vyc[0] = '0;
  assign vys[0] = '0;

  for (genvar k = 0; k < N_ITER; k++) begin : g_stage
    xy_stage #(.DW(DW), .K(k)) u_stage (
      .clk, .reset, .d(d[k]),
      .xc(vxc[k]), .xs(vxs[k]), .yc(vyc[k]), .ys(vys[k]),
      .xc_o(vxc[k+1]), .xs_o(vxs[k+1]), .yc_o(vyc[k+1]), .ys_o(vys[k+1])
    );
  end

  assign xc = vxc[N_ITER];
  assign xs = vxs[N_ITER];
  assign yc = vyc[N_ITER];
  assign ys = vys[N_ITER];

  logic [2*N_ITER-1:0] neg_sr;
  always_ff @(posedge clk) begin
    if (reset) neg_sr <= '0;
    else       neg_sr <= {neg_sr[2*N_ITER-2:0], negate_in};
  end
  assign negate = neg_sr[2*N_ITER-1];

endmodule
