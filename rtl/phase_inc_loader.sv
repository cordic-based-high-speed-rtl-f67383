// Phase increment loader for the on-line phase accumulator (frequency switch).
//
// A one-cycle load_phase_inc pulse captures phase_inc and starts a chain of
// sequential load pulses that walks down the accumulator rows, one row per
// clock, most significant first, so the increment enters with the same skew as
// the accumulator digits. Each row of the increment latch is written twice:
// first with P (row j gets p_{j-1}, row 0 gets 0), one clock later with 2P
// (row j gets p_j, the last row gets 0). While a row receives 2P its
// accumulator feedback latches are jammed (en = 0) for that clock. The result
// is the sample sequence ..., x+3P0, x+2P0+P1, x+2P0+2P1, x+2P0+3P1, ...:
// one sample at the switch is off the sequence, and the switch needs no adder.
//
// phase_inc = p_0 p_1 ... p_{PA_W-2} (p_0 the MSB) is an unsigned increment of
// phase_inc / 2^PA_W turns per clock (below half the clock rate). From a reset
// accumulator this is the off-line load. A new load must wait until the
// previous one has finished, PA_W+1 clocks after its pulse; busy shows that.
module phase_inc_loader #(
  parameter int PA_W = 15
) (
  input  logic            clk,
  input  logic            reset,
  input  logic [PA_W-2:0] phase_inc,
  input  logic            load_phase_inc,
  output logic [PA_W-1:0] inc,      // increment latch, bit PA_W-1-j = row j
  output logic [PA_W-1:0] en,       // accumulator feedback enables, same indexing
  output logic            busy
);

  logic [PA_W-2:0] p_q;
  logic [PA_W:0]   pls;             // pls[j]: load pulse of step j, one clock apart

  logic [PA_W-1:0] p_once, p_twice; // P and 2P in row indexing
  assign p_once  = {1'b0, p_q};
  assign p_twice = {p_q, 1'b0};

  always_ff @(posedge clk) begin
    if (reset) begin
      p_q <= '0;
      pls <= '0;
      inc <= '0;
    end else begin
      if (load_phase_inc) p_q <= phase_inc;
      pls <= {pls[PA_W-1:0], load_phase_inc};
      for (int j = 0; j < PA_W; j++) begin
        if (pls[j])        inc[PA_W-1-j] <= p_once[PA_W-1-j];
        else if (pls[j+1]) inc[PA_W-1-j] <= p_twice[PA_W-1-j];
      end
    end
  end

  for (genvar j = 0; j < PA_W; j++) begin : g_en
    assign en[PA_W-1-j] = ~pls[j+1];
  end

  assign busy = |pls;

  a_no_overlap: assert property (@(posedge clk) disable iff (reset)
    load_phase_inc |-> !busy)
    else $error("phase_inc_loader: load_phase_inc while a load is in progress");

endmodule
