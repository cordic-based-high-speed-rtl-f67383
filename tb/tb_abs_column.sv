// Testbench of abs_column (R = 8 rows) fed with random carry-save words, one
// word per clock, digits skewed one clock apart MSD first as in the array.
// For each word it collects the skewed output digits and checks that output
// plus the two-ulp correction equals |X| (mod 2^R, X read mod 2), that the
// sign is right for every X other than 0 and -1, that sigma_out chains the
// sign and that each digit appears exactly one clock after it went in.
module tb_abs_column;
  localparam int R = 8;
  localparam int NW = 3000;
  logic clk = 0, reset = 1;
  logic [R-1:0] c_in = '0, s_in = '0, c_out, s_out;
  logic sigma_in = 0, sigma_hat, sigma_tld, sigma_out, singular;
  int checks = 0, failures = 0;
  logic [R-1:0] wc [0:NW+R+4], ws [0:NW+R+4], oc [0:NW+R+4], os [0:NW+R+4];
  logic sgi [0:NW+R+4], sh [0:NW+R+4], st [0:NW+R+4], sgo [0:NW+R+4];

  abs_column #(.R(R)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (NW + 100) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int w = 0; w <= NW + R + 4; w++) begin
      wc[w] = (w < NW) ? R'($urandom) : '0;
      ws[w] = (w < NW) ? R'($urandom) : '0;
      sgi[w] = (w < NW) ? 1'($urandom) : 1'b0;
    end
    // a few words with every fractional digit 1 (sign open down to the LSD)
    for (int w = 0; w < 40; w++) begin
      logic [R-1:0] m;
      m = R'($urandom);
      wc[w] = m; ws[w] = ~m;
      wc[w][0] = 1'($urandom); ws[w][0] = 1'($urandom);
      wc[w][R-1] = 1'($urandom); ws[w][R-1] = 1'($urandom);
    end
    @(negedge clk); @(negedge clk); reset = 0;
    for (int k = 0; k < NW + R + 2; k++) begin
      // drive row j with word k-j
      for (int j = 0; j < R; j++) begin
        c_in[R-1-j] = (k - j >= 0) ? wc[k-j][R-1-j] : 1'b0;
        s_in[R-1-j] = (k - j >= 0) ? ws[k-j][R-1-j] : 1'b0;
      end
      sigma_in = (k - (R - 1) >= 0) ? sgi[k-(R-1)] : 1'b0;
      @(negedge clk);
      // registered row j of word k-j is now visible
      for (int j = 0; j < R; j++) if (k - j >= 0) begin
        oc[k-j][R-1-j] = c_out[R-1-j];
        os[k-j][R-1-j] = s_out[R-1-j];
      end
      if (k - (R - 1) >= 0) begin
        sh[k-(R-1)] = sigma_hat; st[k-(R-1)] = sigma_tld; sgo[k-(R-1)] = sigma_out;
      end
    end
    for (int w = 0; w < NW; w++) begin
      logic signed [R-1:0] x;
      logic [R-1:0] y, mag;
      x = wc[w] + ws[w];
      mag = (x < 0) ? -x : x;
      y = oc[w] + os[w] + (st[w] ? R'(2) : R'(0));
      checks++;
      if (y !== mag) begin
        failures++;
        if (failures < 8) $display("word %0d: c=%b s=%b x=%0d got |x|=%0d", w, wc[w], ws[w], x, y);
      end
      if (x != 0 && x != -(1 <<< (R - 1))) begin
        checks++;
        if (sh[w] !== (x < 0) || sgo[w] !== (sgi[w] ^ sh[w])) begin
          failures++;
          if (failures < 8) $display("word %0d: x=%0d sign %b", w, x, sh[w]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
