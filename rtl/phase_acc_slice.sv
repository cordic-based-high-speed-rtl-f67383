// One digit slice of the carry-save on-line phase accumulator.
//
// The slice adds the phase increment bit inc to the digit of the sample two
// clocks earlier, held in two feedback latches: fb_sum (this digit's own sum
// bit) and fb_carry (the carry that the next less significant slice produced
// for that sample). The full adder's sum is latched into sum_q and its carry
// leaves, unlatched, to the next more significant slice. The output digit is
// (carry_in, sum_q): the latched sum together with the carry arriving from
// below, which belongs to the same sample because the slices are skewed one
// clock per digit, most significant first.
// en = 0 jams the two feedback latches for one clock; the increment loader
// does this while it loads 2P during a frequency switch.
module phase_acc_slice (
  input  logic clk,
  input  logic reset,
  input  logic inc,
  input  logic en,
  input  logic carry_in,     // from the next less significant slice
  output logic carry_out,    // to the next more significant slice
  output logic sum_q
);

  logic fb_sum, fb_carry;

  always_ff @(posedge clk) begin
    if (reset) begin
      fb_sum   <= 1'b0;
      fb_carry <= 1'b0;
      sum_q    <= 1'b0;
    end else begin
      if (en) begin
        fb_sum   <= sum_q;
        fb_carry <= carry_in;
      end
      sum_q <= fb_sum ^ fb_carry ^ inc;
    end
  end

  assign carry_out = (fb_sum & fb_carry) | (inc & (fb_sum ^ fb_carry));

endmodule
