// Carry-save on-line phase accumulator.
//
// PA_W phase_acc_slice digits form a carry-save accumulator whose output is
// skewed most significant digit first, so it feeds the DCORDIC ABS columns
// without a skewing latch block. Each slice adds the increment latch bit to the
// sample two clocks earlier (a[n] = a[n-2] + 2P); as long as consecutive
// samples differ by P, the output advances by P per clock. The loader sets up
// that difference. Arithmetic is mod 2: the range [-1,1) is one full turn and
// the carry out of the sign digit is dropped (left unread). Nothing enters the carry slot
// of the last digit.
//
// Output: digit j (row j, weight 2^-j, bit PA_W-1-j of acc_c/acc_s) of sample
// n is valid in cycle n+j+1, where sample n is the one whose digit 0 was added
// in cycle n. The value is acc_c + acc_s (both read as two's complement with
// PA_W-1 fractional bits), mod 2.
module online_phase_acc #(
  parameter int PA_W = 15
) (
  input  logic            clk,
  input  logic            reset,
  input  logic [PA_W-1:0] inc,     // increment latch contents, bit PA_W-1-j = row j
  input  logic [PA_W-1:0] en,      // feedback enables, same indexing
  output logic [PA_W-1:0] acc_c,
  output logic [PA_W-1:0] acc_s
);

  logic [PA_W:0] cy;   // cy[b]: carry into bit b; cy[0] is the free carry slot
  assign cy[0] = 1'b0;

  for (genvar b = 0; b < PA_W; b++) begin : g_digit
    phase_acc_slice u_slice (
      .clk, .reset,
      .inc      (inc[b]),
      .en       (en[b]),
      .carry_in (cy[b]),
      .carry_out(cy[b+1]),
      .sum_q    (acc_s[b])
    );
  end

  assign acc_c = cy[PA_W-1:0];

endmodule
