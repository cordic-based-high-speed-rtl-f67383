// One rotation stage of the carry-save sine/cosine datapath.
//
// Computes, for rotation direction d (0: counter-clockwise, 1: clockwise),
//   x' = x - (+-) 2^-K y,   y' = y + (+-) 2^-K x
// with x and y each held as a carry-save pair of N = DW+2 bit two's complement
// vectors (one guard digit, sign, DW fractional bits). The shifted operands
// are jammed: bits shifted out are dropped and the LSB is forced to 1 (for
// K > 0). A subtraction inverts the shifted vector and puts the +1 into the
// free carry slot of the adder. Each coordinate needs two overflow-correcting
// CSAs, one per vector of the other coordinate.
//
// Timing: two pipeline stages. Inputs and d are sampled in cycle t (first CSA
// of each coordinate), the second CSA runs in cycle t+1 and the outputs are
// valid in cycle t+2, which matches the two-clock spacing of the rotation
// directions coming from the angle path.
module xy_stage #(
  parameter int DW = 17,
  parameter int K  = 0
) (
  input  logic          clk,
  input  logic          reset,
  input  logic          d,
  input  logic [DW+1:0] xc,
  input  logic [DW+1:0] xs,
  input  logic [DW+1:0] yc,
  input  logic [DW+1:0] ys,
  output logic [DW+1:0] xc_o,
  output logic [DW+1:0] xs_o,
  output logic [DW+1:0] yc_o,
  output logic [DW+1:0] ys_o
);

  localparam int N = DW + 2;

  function automatic logic [N-1:0] jam_shift(logic [N-1:0] v);
    logic [N-1:0] r;
    r = N'($signed(v) >>> K);
    if (K > 0) r[0] = 1'b1;
    return r;
  endfunction

  // x takes -2^-K y when d = 0; y takes -2^-K x when d = 1
  logic neg_x, neg_y;
  assign neg_x = ~d;
  assign neg_y = d;

  logic [N-1:0] x1c, x1s, y1c, y1s;
  oc_csa #(.N(N)) u_x1 (.a(xc), .b(xs), .c(jam_shift(yc) ^ {N{neg_x}}), .cin(neg_x), .carry(x1c), .sum(x1s));
  oc_csa #(.N(N)) u_y1 (.a(yc), .b(ys), .c(jam_shift(xc) ^ {N{neg_y}}), .cin(neg_y), .carry(y1c), .sum(y1s));

  logic [N-1:0] x1c_q, x1s_q, y1c_q, y1s_q, xsh_q, ysh_q;
  logic         d_q;
  always_ff @(posedge clk) begin
    if (reset) begin
      {x1c_q, x1s_q, y1c_q, y1s_q, xsh_q, ysh_q} <= '0;
      d_q <= 1'b0;
    end else begin
      x1c_q <= x1c;
      x1s_q <= x1s;
      y1c_q <= y1c;
      y1s_q <= y1s;
      xsh_q <= jam_shift(xs);
      ysh_q <= jam_shift(ys);
      d_q   <= d;
    end
  end

  logic [N-1:0] x2c, x2s, y2c, y2s;
  oc_csa #(.N(N)) u_x2 (.a(x1c_q), .b(x1s_q), .c(ysh_q ^ {N{~d_q}}), .cin(~d_q), .carry(x2c), .sum(x2s));
  oc_csa #(.N(N)) u_y2 (.a(y1c_q), .b(y1s_q), .c(xsh_q ^ {N{d_q}}),  .cin(d_q),  .carry(y2c), .sum(y2s));

  always_ff @(posedge clk) begin
    if (reset) begin
      {xc_o, xs_o, yc_o, ys_o} <= '0;
    end else begin
      xc_o <= x2c;
      xs_o <= x2s;
      yc_o <= y2c;
      ys_o <= y2s;
    end
  end

endmodule
