// Testbench of abs_lsd_cell: all 32 combinations of sign state, digit and
// sigma_in against the truth table of the LSD cell and sign decoder, and the
// chaining rule sigma_out = sigma_in xor sigma_hat.
module tb_abs_lsd_cell;
  import dcordic_pkg::*;
  abs_sign_e si, so;
  logic ci, sm, sgi, co, smo, sh, st, sgo;
  int checks = 0, failures = 0;

  abs_lsd_cell dut (.sign_in(si), .carry_in(ci), .sum_in(sm), .sigma_in(sgi),
                    .carry_out(co), .sum_out(smo), .sign_out(so),
                    .sigma_hat(sh), .sigma_tld(st), .sigma_out(sgo));

  // expected {carry_out, sum_out, sigma_hat, sigma_tld}
  function automatic logic [3:0] expect_row(logic [1:0] s, logic c, logic m);
    case ({s, c, m})
      4'b00_00: return 4'b00_00;
      4'b00_01: return 4'b01_00;
      4'b00_10: return 4'b10_00;
      4'b00_11: return 4'b00_11;
      4'b01_00: return 4'b00_11;
      4'b01_01: return 4'b01_10;
      4'b01_10: return 4'b10_10;
      4'b01_11: return 4'b00_00;
      4'b10_00: return 4'b00_00;
      4'b10_01: return 4'b01_00;
      4'b10_10: return 4'b10_00;
      4'b10_11: return 4'b11_00;
      4'b11_00: return 4'b11_11;
      4'b11_01: return 4'b01_11;
      4'b11_10: return 4'b10_11;
      default:  return 4'b00_11;
    endcase
  endfunction

  initial begin
    fork begin #1000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end join_none
    for (int k = 0; k < 32; k++) begin
      logic [3:0] e;
      si = abs_sign_e'(k[3:2]); ci = k[1]; sm = k[0]; sgi = k[4];
      #1;
      e = expect_row(k[3:2], k[1], k[0]);
      checks++;
      if ({co, smo, sh, st} !== e || so !== si || sgo !== (sgi ^ e[1])) begin
        failures++;
        $display("in %b: got %b%b %b%b sign %s sigma_out %b want %b", k[4:0], co, smo, sh, st, so.name(), sgo, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
