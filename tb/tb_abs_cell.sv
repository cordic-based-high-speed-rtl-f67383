// Testbench of abs_cell: all 16 combinations of sign state and digit against
// the cell's truth table, plus a check that the emitted digit always has the
// value the MSD-first absolute value needs (passed, inverted or zero).
module tb_abs_cell;
  import dcordic_pkg::*;
  abs_sign_e si, so;
  logic ci, sm, co, smo;
  int checks = 0, failures = 0;

  abs_cell dut (.sign_in(si), .carry_in(ci), .sum_in(sm), .carry_out(co), .sum_out(smo), .sign_out(so));

  // expected {carry_out, sum_out, sign_out} for {sign_in, carry_in, sum_in}
  function automatic logic [3:0] expect_row(logic [1:0] s, logic c, logic m);
    case ({s, c, m})
      4'b00_00: return {2'b00, PLUS};
      4'b00_01: return {2'b01, MSD02};
      4'b00_10: return {2'b10, MSD02};
      4'b00_11: return {2'b00, MINUS};
      4'b01_00: return {2'b00, MINUS};
      4'b01_01: return {2'b00, MSD1};
      4'b01_10: return {2'b00, MSD1};
      4'b01_11: return {2'b00, PLUS};
      4'b10_00: return {2'b00, PLUS};
      4'b10_01: return {2'b01, PLUS};
      4'b10_10: return {2'b10, PLUS};
      4'b10_11: return {2'b11, PLUS};
      4'b11_00: return {2'b11, MINUS};
      4'b11_01: return {2'b01, MINUS};
      4'b11_10: return {2'b10, MINUS};
      default:  return {2'b00, MINUS};
    endcase
  endfunction

  initial begin
    fork begin #1000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end join_none
    for (int k = 0; k < 16; k++) begin
      logic [3:0] e;
      si = abs_sign_e'(k[3:2]); ci = k[1]; sm = k[0];
      #1;
      e = expect_row(k[3:2], k[1], k[0]);
      checks++;
      if ({co, smo, so} !== e) begin
        failures++;
        $display("in %b: got %b%b %s want %b", k[3:0], co, smo, so.name(), e);
      end
      // digit value: PLUS passes, MINUS gives 2-v, undecided MSD1 gives 0
      checks++;
      if (si == PLUS && (co + smo) != (ci + sm)) failures++;
      else if (si == MINUS && (co + smo) != 2 - (ci + sm)) failures++;
      else if (si == MSD1 && (co | smo)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
