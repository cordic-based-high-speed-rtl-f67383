// Testbench of angle_mapper (R = 10 rows). Every angle z of the 10-digit
// grid is fed several times in different random carry-save forms (skewed,
// one word per clock), plus the forms of -1 and -1/2 that leave the sign open
// down to the LSD. With m the folded magnitude (output plus two-ulp
// correction), it checks m <= 1/2, (-1)^negate*cos(pi*m) = cos(pi*z) and
// (-1)^negate*(-1)^d0*sin(pi*m) = sin(pi*z), and the clock at which the
// outputs appear.
module tb_angle_mapper;
  import dcordic_pkg::*;
  localparam int R = 10;
  localparam int NW = 4 * (1 << R) + 8;
  logic clk = 0, reset = 1;
  logic [R-1:0] c_in = '0, s_in = '0, c_out, s_out;
  logic d0, negate, sigma_tld;
  int checks = 0, failures = 0, n_neg = 0, n_sing = 0;
  logic [R-1:0] wc [0:NW+R+8], ws [0:NW+R+8], oc [0:NW+R+8], os [0:NW+R+8];
  logic od [0:NW+R+8], on [0:NW+R+8], ot [0:NW+R+8];

  angle_mapper #(.R(R)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (NW + 200) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int w = 0; w <= NW + R + 8; w++) begin
      logic [R-1:0] x, c;
      x = R'(w);                      // every value, four times
      c = R'($urandom);
      wc[w] = c; ws[w] = x - c;
    end
    // -1 and -1/2 with all fractional digits 1 and the LSD 2
    wc[0] = 10'b0_111111111; ws[0] = 10'b1_000000001;        // -1
    wc[1] = 10'b1_011111111; ws[1] = 10'b1_100000001;        // -1/2
    wc[2] = 10'b1_100000000; ws[2] = 10'b1_000000000;        // -1/2
    @(negedge clk); @(negedge clk); reset = 0;
    for (int k = 0; k < NW + R + 4; k++) begin
      for (int j = 0; j < R; j++) begin
        c_in[R-1-j] = (k - j >= 0) ? wc[k-j][R-1-j] : 1'b0;
        s_in[R-1-j] = (k - j >= 0) ? ws[k-j][R-1-j] : 1'b0;
      end
      @(negedge clk);
      // output digit j of word w is valid at edge w+3+j; flags at w+R+2
      for (int j = 0; j < R; j++) if (k + 1 - 3 - j >= 0) begin
        oc[k+1-3-j][R-1-j] = c_out[R-1-j];
        os[k+1-3-j][R-1-j] = s_out[R-1-j];
      end
      if (k + 1 - R - 2 >= 0) begin
        od[k+1-R-2] = d0; on[k+1-R-2] = negate; ot[k+1-R-2] = sigma_tld;
      end
    end
    for (int w = 0; w < NW; w++) begin
      logic signed [R-1:0] x;
      logic [R-1:0] mv;
      real z, m, ec, es;
      x = wc[w] + ws[w];
      z = real'(x) / (2.0 ** (R - 1));
      mv = oc[w] + os[w] + (ot[w] ? R'(2) : R'(0));
      m = real'(mv) / (2.0 ** (R - 1));
      ec = (on[w] ? -1.0 : 1.0) * $cos(PI * m) - $cos(PI * z);
      es = (on[w] ? -1.0 : 1.0) * (od[w] ? -1.0 : 1.0) * $sin(PI * m) - $sin(PI * z);
      checks++;
      if (m > 0.5 || ec > 1e-9 || ec < -1e-9 || es > 1e-9 || es < -1e-9) begin
        failures++;
        if (failures < 8) $display("word %0d z=%f: m=%f negate=%b d0=%b", w, z, m, on[w], od[w]);
      end
      if (on[w]) n_neg++;
      if (x == -(1 <<< (R - 1)) || x == -(1 <<< (R - 2))) n_sing++;
    end
    $display("negated %0d, singular inputs %0d", n_neg, n_sing);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
