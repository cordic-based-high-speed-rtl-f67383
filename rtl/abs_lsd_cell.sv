// Least significant digit of an ABS column together with the sign decoder.
//
// The LSD cell finishes the MSD-first absolute value of a carry-save number and
// turns the two-bit sign state into the rotation signs of one DCORDIC
// iteration:
//   sigma_hat  - sign of the number (1 = minus),
//   sigma_out  - sigma_in * sigma_hat, the rotation direction of the next
//                iteration (1 = minus),
//   sigma_tld  - 1 when the magnitude still needs two ulps added, which the
//                following adder column does in its extra LSD row.
// When the sign is still open at the LSD and the MSD was 1 (all fractional
// digits were 1), the number is negative and its magnitude is one ulp: the
// cell emits that ulp directly and sigma_tld stays 0.
// The digit outputs and sign outputs follow the document's truth table of the
// LSD cell and sign decoder. sign_out equals sign_in. Combinational.
module abs_lsd_cell
  import dcordic_pkg::*;
(
  input  abs_sign_e sign_in,
  input  logic      carry_in,
  input  logic      sum_in,
  input  logic      sigma_in,
  output logic      carry_out,
  output logic      sum_out,
  output abs_sign_e sign_out,
  output logic      sigma_hat,
  output logic      sigma_tld,
  output logic      sigma_out
);

  always_comb begin
    carry_out = 1'b0;
    sum_out   = 1'b0;
    sigma_hat = 1'b0;
    sigma_tld = 1'b0;
    sign_out  = sign_in;
    unique case (sign_in)
      MSD02: begin
        if (carry_in && sum_in) begin
          sigma_hat = 1'b1;           // 2 decides minus: digit becomes 0, add two ulps
          sigma_tld = 1'b1;
        end else if (carry_in != sum_in) begin
          carry_out = carry_in;       // all digits 1, MSD 0 or 2: positive
          sum_out   = sum_in;
        end
      end
      MSD1: begin
        if (!carry_in && !sum_in) begin
          sigma_hat = 1'b1;           // 0 decides minus at the LSD: magnitude two ulps
          sigma_tld = 1'b1;
        end else if (carry_in != sum_in) begin
          carry_out = carry_in;       // all digits 1, MSD 1: magnitude one ulp
          sum_out   = sum_in;
          sigma_hat = 1'b1;
        end
      end
      PLUS: begin
        carry_out = carry_in;
        sum_out   = sum_in;
      end
      MINUS: begin
        if (carry_in == sum_in) begin
          carry_out = ~carry_in;
          sum_out   = ~sum_in;
        end else begin
          carry_out = carry_in;
          sum_out   = sum_in;
        end
        sigma_hat = 1'b1;
        sigma_tld = 1'b1;
      end
    endcase
    sigma_out = sigma_in ^ sigma_hat;
  end

endmodule
