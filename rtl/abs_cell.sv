// One digit of the MSD-first absolute value column for carry-save numbers.
//
// A carry-save digit (carry_in, sum_in) arrives together with the sign state
// left by the more significant digits. While the sign is open the cell decides
// it from the first digit whose two bits are equal; once decided it passes the
// digit (PLUS) or inverts both bits (MINUS); the missing two ulps of a negation
// are added later, in the least significant row of the next adder column.
// The cell works for carry-save numbers that have overflowed, as the output of
// a carry-save phase accumulator does.
//
// The function is the document's truth table for the cell, entry for entry.
// The cell is purely combinational; the column around it holds the latches.
module abs_cell
  import dcordic_pkg::*;
(
  input  abs_sign_e sign_in,
  input  logic      carry_in,
  input  logic      sum_in,
  output logic      carry_out,
  output logic      sum_out,
  output abs_sign_e sign_out
);

  always_comb begin
    carry_out = 1'b0;
    sum_out   = 1'b0;
    sign_out  = sign_in;
    unique case (sign_in)
      MSD02: begin
        // undecided, MSD was 0 or 2: digit 1 passes, 0 or 2 decides
        if (carry_in == sum_in) begin
          sign_out = carry_in ? MINUS : PLUS;
        end else begin
          carry_out = carry_in;
          sum_out   = sum_in;
        end
      end
      MSD1: begin
        // undecided, MSD was 1: output stays 0; 2 means plus, 0 minus
        if (carry_in == sum_in) sign_out = carry_in ? PLUS : MINUS;
      end
      PLUS: begin
        carry_out = carry_in;
        sum_out   = sum_in;
      end
      MINUS: begin
        // invert the digit; a digit of value 1 keeps its bits
        if (carry_in == sum_in) begin
          carry_out = ~carry_in;
          sum_out   = ~sum_in;
        end else begin
          carry_out = carry_in;
          sum_out   = sum_in;
        end
      end
    endcase
  end

endmodule
