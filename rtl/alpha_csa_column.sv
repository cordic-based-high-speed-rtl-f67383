// Carry-save adder column of one DCORDIC iteration: adds the constant -alpha_i.
//
// The column adds the two's complement constant ALPHA (rows 0..R-2, the
// quantized -alpha_i) to the MSD-first skewed carry-save magnitude coming from
// the previous ABS column. Because one input of every full adder is a constant
// bit, a row is a half adder where the bit is 0 and a modified half adder
// (a + b + 1) where it is 1: no angle table exists. The last row R-1 is the
// extra LSD row: there a full adder adds sigma_tld (the two-ulp correction of
// the previous negation) and a second copy of sigma_tld fills the free carry
// slot of that row, so both ulps are added without another column.
//
// Timing: input digit j is valid in cycle F+j and is added at once; its sum
// bit is latched and its carry goes, unlatched, to row j-1, whose output is
// read one cycle later together with that carry. Output digit j (sum latched,
// carry combinational from row j+1) is therefore valid in cycle F+1+j: an
// on-line delay of one. Row 0 forms no carry (arithmetic mod 2).
// sigma_tld_in must be valid in cycle F+R-1; sigma_in is passed through one
// latch to sigma_q so that it meets the LSD of the next ABS column.
module alpha_csa_column #(
  parameter int           R     = 18,
  parameter logic [R-1:0] ALPHA = '0    // bit R-1-j = row j; bit 0 unused
) (
  input  logic         clk,
  input  logic         reset,
  input  logic [R-1:0] c_in,
  input  logic [R-1:0] s_in,
  input  logic         sigma_tld_in,
  input  logic         sigma_in,
  output logic [R-1:0] c_out,
  output logic [R-1:0] s_out,
  output logic         sigma_q
);

  logic [R-1:0] sum_d;
  logic [R-2:0] cy;          // cy[b]: carry produced by the row at bit b (weight of bit b+1)
  logic         tld_q;

  // rows 1..R-2 (bits R-2..1); row 0 (bit R-1) needs only its sum
  for (genvar b = 1; b < R - 1; b++) begin : g_row
    if (ALPHA[b]) begin : g_mha
      assign sum_d[b] = ~(c_in[b] ^ s_in[b]);
      assign cy[b]    = c_in[b] | s_in[b];
    end else begin : g_ha
      assign sum_d[b] = c_in[b] ^ s_in[b];
      assign cy[b]    = c_in[b] & s_in[b];
    end
  end
  assign sum_d[R-1] = c_in[R-1] ^ s_in[R-1] ^ ALPHA[R-1];
  // extra LSD row: full adder with the two-ulp correction
  assign sum_d[0] = c_in[0] ^ s_in[0] ^ sigma_tld_in;
  assign cy[0]    = (c_in[0] & s_in[0]) | (sigma_tld_in & (c_in[0] ^ s_in[0]));

  always_ff @(posedge clk) begin
    if (reset) begin
      s_out   <= '0;
      tld_q   <= 1'b0;
      sigma_q <= 1'b0;
    end else begin
      s_out   <= sum_d;
      tld_q   <= sigma_tld_in;
      sigma_q <= sigma_in;
    end
  end

  assign c_out = {cy[R-2:0], tld_q};

endmodule
